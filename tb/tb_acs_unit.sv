// tb_acs_unit: forward and backward instances of the state-metric unit against
// a reference that enumerates the 16 trellis edges of the LTE RSC code from
// its shift-register description, takes the max per state, normalises the
// maximum to 0 and clamps at -2048. Random metrics, including saturated ones.
module tb_acs_unit;
  import tdec_pkg::*;
  metric_vec_t m_in, mf, mb;
  gamma_vec_t g;
  int checks = 0, failures = 0;
  acs_unit #(.FORWARD(1'b1)) u_f (.m_in, .g, .m_out(mf));
  acs_unit #(.FORWARD(1'b0)) u_b (.m_in, .g, .m_out(mb));

  function automatic void edge_of(int s, int u, output int ns, output int p);
    int r1, r2, r3, fb;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    fb = u ^ r2 ^ r3;
    p  = fb ^ r1 ^ r3;
    ns = (fb << 2) | (r1 << 1) | r2;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int m [8], gv [4], ef [8], eb [8], ns, p, mxf, mxb;
      for (int s = 0; s < 8; s++) begin
        m[s] = ($urandom_range(0, 3) == 0) ? -2048 : -$signed($urandom_range(0, 2047));
        m_in[s] = metric_t'(m[s]);
      end
      for (int i = 0; i < 4; i++) begin
        gv[i] = $signed($urandom_range(0, 320)) - 160;
        g[i] = gamma_t'(gv[i]);
      end
      for (int s = 0; s < 8; s++) begin ef[s] = -1000000; eb[s] = -1000000; end
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          edge_of(s, u, ns, p);
          if (m[s] + gv[2*u+p] > ef[ns]) ef[ns] = m[s] + gv[2*u+p];
          if (m[ns] + gv[2*u+p] > eb[s]) eb[s] = m[ns] + gv[2*u+p];
        end
      mxf = ef[0]; mxb = eb[0];
      for (int s = 1; s < 8; s++) begin
        if (ef[s] > mxf) mxf = ef[s];
        if (eb[s] > mxb) mxb = eb[s];
      end
      #1;
      for (int s = 0; s < 8; s++) begin
        int xf, xb;
        xf = ef[s] - mxf; if (xf < -2048) xf = -2048;
        xb = eb[s] - mxb; if (xb < -2048) xb = -2048;
        checks += 2;
        if (int'(mf[s]) != xf) begin failures++; $display("FAIL fwd s=%0d %0d exp %0d", s, mf[s], xf); end
        if (int'(mb[s]) != xb) begin failures++; $display("FAIL bwd s=%0d %0d exp %0d", s, mb[s], xb); end
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
