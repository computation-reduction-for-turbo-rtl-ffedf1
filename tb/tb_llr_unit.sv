// tb_llr_unit: the LLR unit against a reference that evaluates eq. (1) over
// the 16 edges of the LTE RSC trellis, subtracts Lsys+Lapr for the extrinsic
// part, scales by 0.75 (floor) and saturates to 8 bits. Random metrics, plus
// cases that drive the extrinsic LLR into both saturation limits.
module tb_llr_unit;
  import tdec_pkg::*;
  metric_vec_t alpha, beta;
  gamma_vec_t g;
  ext_t ext_llr;
  logic hard;
  int checks = 0, failures = 0, n_sat = 0;
  llr_unit dut (.*);

  function automatic void edge_of(int s, int u, output int ns, output int p);
    int r1, r2, r3, fb;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    fb = u ^ r2 ^ r3;
    p  = fb ^ r1 ^ r3;
    ns = (fb << 2) | (r1 << 1) | r2;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a [8], b [8], lsa, lp, ns, p, m0, m1, raw, e, apo, range;
      range = (t % 2 == 1) ? 40 : 2047;
      for (int s = 0; s < 8; s++) begin
        a[s] = -$signed($urandom_range(0, range));
        b[s] = -$signed($urandom_range(0, range));
        alpha[s] = metric_t'(a[s]);
        beta[s] = metric_t'(b[s]);
      end
      lsa = $signed($urandom_range(0, 288)) - 144;
      lp  = $signed($urandom_range(0, 31)) - 16;
      g[0] = '0; g[1] = gamma_t'(lp); g[2] = gamma_t'(lsa); g[3] = gamma_t'(lsa + lp);
      m0 = -1000000; m1 = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          edge_of(s, u, ns, p);
          if (u == 0 && a[s] + p * lp + b[ns] > m0) m0 = a[s] + p * lp + b[ns];
          if (u == 1 && a[s] + lsa + p * lp + b[ns] > m1) m1 = a[s] + lsa + p * lp + b[ns];
        end
      apo = m1 - m0;
      raw = apo - lsa;
      e = int'($floor(0.75 * real'(raw)));
      if (e > 127) begin e = 127; n_sat++; end
      if (e < -128) begin e = -128; n_sat++; end
      #1;
      checks += 2;
      if (int'(ext_llr) != e) begin failures++; $display("FAIL ext %0d exp %0d", ext_llr, e); end
      if (hard != (apo > 0)) begin failures++; $display("FAIL hard"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never reached"); end
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
