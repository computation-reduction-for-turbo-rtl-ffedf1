// tb_state_argmax: random normalised metric vectors (with ties) against a
// linear search for the first largest entry.
module tb_state_argmax;
  import tdec_pkg::*;
  metric_vec_t m;
  logic [2:0] idx;
  int checks = 0, failures = 0;
  state_argmax dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int v [8], best, bi;
      for (int s = 0; s < 8; s++) begin
        v[s] = -$signed($urandom_range(0, (t % 2 == 1) ? 3 : 2048));
        m[s] = metric_t'(v[s]);
      end
      best = v[0]; bi = 0;
      for (int s = 1; s < 8; s++) if (v[s] > best) begin best = v[s]; bi = s; end
      #1;
      checks++;
      if (int'(idx) != bi) begin failures++; $display("FAIL idx=%0d exp %0d", idx, bi); end
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
