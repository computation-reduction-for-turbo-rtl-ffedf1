// tb_alpha_mem: random writes and asynchronous reads of the state-metric
// memory (default W=32) against an array model.
module tb_alpha_mem;
  import tdec_pkg::*;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  metric_vec_t wdata = '0, rdata;
  metric_vec_t model [32];
  bit valid [32];
  int checks = 0, failures = 0;
  alpha_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int i = 0; i < 32; i++) valid[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      waddr = 5'($urandom_range(0, 31));
      for (int s = 0; s < 8; s++) wdata[s] = metric_t'($urandom);
      raddr = 5'($urandom_range(0, 31));
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
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
