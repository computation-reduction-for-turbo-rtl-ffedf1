// tb_bmu: random LLR triples through the branch metric unit; every one of the
// four edge metrics u*(Lsys+Lapr) + p*Lpar is compared with integer arithmetic.
module tb_bmu;
  import tdec_pkg::*;
  chan_t sys_llr, par_llr;
  ext_t apr_llr;
  gamma_vec_t g;
  int checks = 0, failures = 0;
  bmu dut (.*);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s, p, a;
      s = $signed($urandom_range(0, 31)) - 16;
      p = $signed($urandom_range(0, 31)) - 16;
      a = $signed($urandom_range(0, 255)) - 128;
      if (t == 0) begin s = -16; p = -16; a = -128; end
      if (t == 1) begin s = 15; p = 15; a = 127; end
      sys_llr = chan_t'(s); par_llr = chan_t'(p); apr_llr = ext_t'(a);
      #1;
      for (int u = 0; u < 2; u++)
        for (int q = 0; q < 2; q++) begin
          checks++;
          if (int'(g[{u[0], q[0]}]) != u * (s + a) + q * p) begin
            failures++;
            $display("FAIL u=%0d p=%0d got %0d", u, q, g[{u[0], q[0]}]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
