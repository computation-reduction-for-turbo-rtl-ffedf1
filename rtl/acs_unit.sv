// acs_unit: one step of the forward (eq. (2)) or backward (eq. (3)) state
// metric recursion with the max* operator replaced by max (Max-Log-MAP).
//
// Forward (FORWARD=1): alpha_k[s] = max over the two edges ending in s of
//   alpha_{k-1}[start] + gamma_k(edge).
// Backward (FORWARD=0): beta_k[s] = max over the two edges leaving s of
//   beta_{k+1}[end] + gamma_{k+1}(edge).
// After the add-compare-select the vector is normalised so that its largest
// entry is 0, and entries below -2^(n_s-1) are clamped there. All metrics are
// therefore in [-2^(n_s-1), 0]; this is the saturated representation that the
// window-skipping approximation of eq. (7) relies on. The normalisation by the
// maximum is a choice of this implementation. Purely combinational.
module acs_unit
  import tdec_pkg::*;
#(
  parameter bit FORWARD = 1'b1
) (
  input  metric_vec_t m_in,   // alpha_{k-1} (forward) or beta_{k+1} (backward)
  input  gamma_vec_t  g,      // branch metrics of the step, g[{u,p}]
  output metric_vec_t m_out   // alpha_k or beta_k
);
  typedef logic signed [NS+1:0] wide_t;

  wide_t cand [Q];
  wide_t mx;
  wide_t d;

  always_comb begin
    for (int s = 0; s < Q; s++) begin
      wide_t c0, c1;
      logic [QB-1:0] s0, s1;
      if (FORWARD) begin
        s0 = prev_state(QB'(s), 1'b0);
        s1 = prev_state(QB'(s), 1'b1);
        c0 = wide_t'(m_in[s0]) + wide_t'(g[{1'b0, parity_bit(s0, 1'b0)}]);
        c1 = wide_t'(m_in[s1]) + wide_t'(g[{1'b1, parity_bit(s1, 1'b1)}]);
      end else begin
        s0 = next_state(QB'(s), 1'b0);
        s1 = next_state(QB'(s), 1'b1);
        c0 = wide_t'(m_in[s0]) + wide_t'(g[{1'b0, parity_bit(QB'(s), 1'b0)}]);
        c1 = wide_t'(m_in[s1]) + wide_t'(g[{1'b1, parity_bit(QB'(s), 1'b1)}]);
      end
      cand[s] = (c1 > c0) ? c1 : c0;
    end
    mx = cand[0];
    for (int s = 1; s < Q; s++) if (cand[s] > mx) mx = cand[s];
    for (int s = 0; s < Q; s++) begin
      d = cand[s] - mx;
      m_out[s] = (d < wide_t'(METRIC_MIN)) ? METRIC_MIN : metric_t'(d);
    end
  end
endmodule
