// alpha_init_mux: selects the first forward state metrics of a window,
// implementing eq. (6) with the approximation of eq. (7).
//   AINIT_FRESH     alpha at the end of the previous window of this SISO,
//                   computed in the current half iteration
//   AINIT_SHAT      the previous window was skipped: the stored s_hat gets
//                   metric 0, every other state -2^(n_s-1) (eq. (7))
//   AINIT_NEIGHBOUR first window of a SISO: the end metrics of the last window
//                   of the neighbouring SISO (inter-SISO inheritance)
//   AINIT_START     first window of the frame: the encoder starts in state 0
// Purely combinational.
module alpha_init_mux
  import tdec_pkg::*;
(
  input  alpha_init_e   sel,
  input  metric_vec_t   fresh,
  input  metric_vec_t   neighbour,
  input  logic [QB-1:0] shat,
  output metric_vec_t   alpha0
);
  always_comb begin
    unique case (sel)
      AINIT_FRESH:     alpha0 = fresh;
      AINIT_NEIGHBOUR: alpha0 = neighbour;
      AINIT_START:     alpha0 = known_state0();
      default: begin
        for (int s = 0; s < Q; s++) alpha0[s] = (QB'(s) == shat) ? metric_t'(0) : METRIC_MIN;
      end
    endcase
  end
endmodule
