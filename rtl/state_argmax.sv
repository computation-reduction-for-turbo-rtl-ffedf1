// state_argmax: finds s_hat = argmax_s alpha[s], the most likely state at the
// end of a window. Only s_hat (log2(Q) bits) is stored for the approximated
// forward-border-metric inheritance of eq. (7). Ties go to the lowest state
// index (a choice of this implementation; after normalisation the maximum is
// 0, so ties mean two states share the best metric). Purely combinational.
module state_argmax
  import tdec_pkg::*;
(
  input  metric_vec_t  m,
  output logic [QB-1:0] idx
);
  metric_t best;
  always_comb begin
    best = m[0];
    idx  = '0;
    for (int s = 1; s < Q; s++) begin
      if (m[s] > best) begin
        best = m[s];
        idx  = QB'(s);
      end
    end
  end
endmodule
