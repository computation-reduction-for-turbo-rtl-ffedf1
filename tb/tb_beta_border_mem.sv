// tb_beta_border_mem: random writes to both halves of the border memory
// (default M_W=24), reads of entry j and of the exported entry 0, and a clear
// in the middle that must bring every entry back to 0.
module tb_beta_border_mem;
  import tdec_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, we = 0, whalf = 0, rhalf = 0;
  logic [4:0] wj = '0, rj = '0;
  metric_vec_t wdata = '0, rdata, entry0;
  metric_vec_t model [2][24];
  int checks = 0, failures = 0;
  beta_border_mem dut (.*);
  always #5 clk = ~clk;
  task automatic zero();
    for (int h = 0; h < 2; h++) for (int j = 0; j < 24; j++) model[h][j] = '0;
  endtask
  initial begin
    zero();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      clear = (t == 2000);
      we = 1'($urandom_range(0, 1));
      whalf = 1'($urandom_range(0, 1));
      wj = 5'($urandom_range(0, 23));
      for (int s = 0; s < 8; s++) wdata[s] = metric_t'($urandom);
      rhalf = 1'($urandom_range(0, 1));
      rj = 5'($urandom_range(0, 23));
      #1;
      checks += 2;
      if (rdata !== model[rhalf][rj]) begin failures++; $display("FAIL rdata"); end
      if (entry0 !== model[rhalf][0]) begin failures++; $display("FAIL entry0"); end
      @(posedge clk);
      if (clear) zero();
      else if (we) model[whalf][wj] = wdata;
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
