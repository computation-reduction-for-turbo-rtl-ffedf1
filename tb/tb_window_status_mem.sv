// tb_window_status_mem: random writes of (sigma, s_hat) for both halves
// (default M_W=24), the two read ports against an array model, and a clear.
module tb_window_status_mem;
  logic clk = 0, rst_n = 0, clear = 0, we = 0, half = 0, wsigma = 0;
  logic [4:0] wj = '0, ja = '0, jb = '0;
  logic [2:0] wshat = '0, shat_b;
  logic sigma_a;
  bit   msig [2][24];
  int   mshat [2][24];
  int checks = 0, failures = 0;
  window_status_mem dut (.*);
  always #5 clk = ~clk;
  task automatic zero();
    for (int h = 0; h < 2; h++) for (int j = 0; j < 24; j++) begin msig[h][j] = 0; mshat[h][j] = 0; end
  endtask
  initial begin
    zero();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      clear = (t == 2000);
      we = 1'($urandom_range(0, 1));
      half = 1'($urandom_range(0, 1));
      wj = 5'($urandom_range(0, 23));
      wsigma = 1'($urandom_range(0, 1));
      wshat = 3'($urandom_range(0, 7));
      ja = 5'($urandom_range(0, 23));
      jb = 5'($urandom_range(0, 23));
      #1;
      checks += 2;
      if (sigma_a !== msig[half][ja]) begin failures++; $display("FAIL sigma"); end
      if (int'(shat_b) != mshat[half][jb]) begin failures++; $display("FAIL shat"); end
      @(posedge clk);
      if (clear) zero();
      else if (we) begin msig[half][wj] = wsigma; mshat[half][wj] = int'(wshat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
