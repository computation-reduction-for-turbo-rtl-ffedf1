// tb_llr_bank_mem: random per-bank reads and writes on the default 8 x 768 x 8
// memory against an array model; read data must appear one cycle after the
// enable and hold while the bank is idle.
module tb_llr_bank_mem;
  logic clk = 0;
  logic [7:0] en = '0, we = '0;
  logic [7:0][9:0] addr = '0;
  logic [7:0][7:0] wdata = '0, rdata;
  logic [7:0] model [8][768];
  bit valid [8][768];
  logic [7:0] exp_rd [8];
  bit exp_ok [8];
  int checks = 0, failures = 0;
  llr_bank_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    for (int b = 0; b < 8; b++) begin
      exp_ok[b] = 0;
      for (int a = 0; a < 768; a++) valid[b][a] = 0;
    end
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        checks += exp_ok[b] ? 1 : 0;
        if (exp_ok[b] && rdata[b] !== exp_rd[b]) begin failures++; $display("FAIL bank %0d", b); end
        en[b] = 1'($urandom_range(0, 3) != 0);
        we[b] = 1'($urandom_range(0, 1));
        addr[b] = 10'($urandom_range(0, 63));
        wdata[b] = 8'($urandom);
      end
      @(posedge clk);
      for (int b = 0; b < 8; b++) begin
        if (en[b] && we[b]) begin
          model[b][addr[b]] = wdata[b];
          valid[b][addr[b]] = 1;
        end else if (en[b]) begin
          exp_ok[b] = valid[b][addr[b]];
          exp_rd[b] = model[b][addr[b]];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
