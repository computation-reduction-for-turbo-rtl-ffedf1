// tb_alpha_init_mux: each selection of eq. (6)/(7) with random inputs:
// fresh and neighbour metrics pass through, the start vector is
// (0, -2048, ..., -2048) and the s_hat vector has 0 at s_hat, -2048 elsewhere.
module tb_alpha_init_mux;
  import tdec_pkg::*;
  alpha_init_e sel;
  metric_vec_t fresh, neighbour, alpha0;
  logic [2:0] shat;
  int checks = 0, failures = 0;
  alpha_init_mux dut (.*);
  initial begin
    for (int t = 0; t < 400; t++) begin
      int e [8];
      for (int s = 0; s < 8; s++) begin
        fresh[s] = metric_t'(-$signed($urandom_range(0, 2048)));
        neighbour[s] = metric_t'(-$signed($urandom_range(0, 2048)));
      end
      shat = 3'($urandom_range(0, 7));
      sel = alpha_init_e'(t % 4);
      for (int s = 0; s < 8; s++)
        case (t % 4)
          0: e[s] = int'(fresh[s]);
          1: e[s] = (s == int'(shat)) ? 0 : -2048;
          2: e[s] = int'(neighbour[s]);
          default: e[s] = (s == 0) ? 0 : -2048;
        endcase
      #1;
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (int'(alpha0[s]) != e[s]) begin failures++; $display("FAIL sel=%0d s=%0d", t % 4, s); end
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
