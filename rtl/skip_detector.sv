// skip_detector: the window-skipping criterion of eq. (5).
//
// During the forward pass of a window each a-priori LLR is compared with the
// threshold theta, during the backward pass each newly computed extrinsic LLR.
// sigma is the AND of all 2W comparisons |x| >= theta: it stays 1 only if every
// a-priori and every extrinsic LLR of the window is at least theta in
// magnitude, i.e. the window has converged and can be skipped from then on.
// clear (one cycle, at the start of a window) sets sigma to 1; each valid
// strobe may clear it on the following clock edge.
module skip_detector
  import tdec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,      // start of a window
  input  logic [7:0] theta,      // threshold, unsigned
  input  logic       apr_valid,
  input  ext_t       apr_llr,
  input  logic       ext_valid,
  input  ext_t       ext_llr,
  output logic       sigma       // 1: every comparison so far was true
);
  function automatic logic reliable(input ext_t x, input logic [7:0] th);
    logic [NE:0] mag;
    mag = x[NE-1] ? (NE+1)'(-x) : (NE+1)'(x);
    return mag >= (NE+1)'(th);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sigma <= 1'b0;
    else if (clear) sigma <= 1'b1;
    else begin
      if (apr_valid && !reliable(apr_llr, theta)) sigma <= 1'b0;
      if (ext_valid && !reliable(ext_llr, theta)) sigma <= 1'b0;
    end
  end
endmodule
