// llr_unit: a-posteriori and extrinsic LLR of one trellis step, eq. (1).
//
// b(e) = alpha_{k-1}[start(e)] + gamma_k(e) + beta_k[end(e)]. The systematic
// term u*(Lsys+Lapr) is common to all edges with the same u, so the unit
// maximises b'(e) = alpha + p*Lpar + beta over the u=1 and the u=0 edges; the
// difference is the raw extrinsic LLR, and adding Lsys+Lapr back gives the
// a-posteriori LLR. The extrinsic output is scaled by delta = 0.75
// (3*x >>> 2, rounding towards minus infinity) and saturated to n_e = 8 bits.
// The hard decision is 1 when the a-posteriori LLR is positive. Purely
// combinational; the rounding of the scaling is a choice of this implementation.
module llr_unit
  import tdec_pkg::*;
(
  input  metric_vec_t alpha,   // alpha_{k-1}
  input  metric_vec_t beta,    // beta_k
  input  gamma_vec_t  g,       // branch metrics of step k from the bmu
  output ext_t        ext_llr, // delta-scaled extrinsic LLR
  output logic        hard     // hard decision on the systematic bit
);
  typedef logic signed [NS+3:0] wide_t;

  wide_t m0, m1, raw, apo, sc;

  always_comb begin
    m0 = '0;
    m1 = '0;
    for (int s = 0; s < Q; s++) begin
      wide_t b0, b1;
      b0 = wide_t'(alpha[s]) + wide_t'(g[{1'b0, parity_bit(QB'(s), 1'b0)}])
         + wide_t'(beta[next_state(QB'(s), 1'b0)]);
      b1 = wide_t'(alpha[s]) + wide_t'(g[{1'b0, parity_bit(QB'(s), 1'b1)}])
         + wide_t'(beta[next_state(QB'(s), 1'b1)]);
      if (s == 0 || b0 > m0) m0 = b0;
      if (s == 0 || b1 > m1) m1 = b1;
    end
    raw = m1 - m0;
    apo = raw + wide_t'(g[2]);
    sc  = (raw + raw + raw) >>> 2;
    if (sc > wide_t'(2 ** (NE - 1) - 1))   ext_llr = ext_t'(2 ** (NE - 1) - 1);
    else if (sc < wide_t'(-(2 ** (NE - 1)))) ext_llr = ext_t'(-(2 ** (NE - 1)));
    else                                   ext_llr = ext_t'(sc);
    hard = apo > 0;
  end
endmodule
