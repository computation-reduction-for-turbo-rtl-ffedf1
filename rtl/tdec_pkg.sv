// tdec_pkg: constants, types and trellis functions shared by the window-skipping
// turbo decoder.
//
// The decoder targets the LTE turbo code: two 8-state recursive systematic
// convolutional (RSC) encoders with feedback polynomial 1+D^2+D^3 and parity
// polynomial 1+D+D^3, joined by a quadratic permutation polynomial (QPP)
// interleaver. The word widths follow the reference configuration of the design:
// 5-bit channel (intrinsic) LLRs, 8-bit extrinsic LLRs and 12-bit state metrics.
//
// LLR sign convention (a choice of this implementation): a positive LLR favours
// bit value 1, so the branch metric of an edge with systematic bit u and parity
// bit p is u*(Lsys+Lapr) + p*Lpar.
//
// State encoding: s = {s1, s2, s3}, s1 the most recent register content. The
// feedback bit is a = u ^ s2 ^ s3, the parity is a ^ s1 ^ s3 and the next
// state is {a, s1, s2}.
package tdec_pkg;

  localparam int Q      = 8;     // trellis states
  localparam int QB     = 3;     // log2(Q)
  localparam int NS     = 12;    // state metric width n_s
  localparam int NE     = 8;     // extrinsic / a-priori LLR width n_e
  localparam int NI     = 5;     // intrinsic (channel) LLR width
  localparam int NG     = 10;    // branch metric width (enough for Lsys+Lapr+Lpar)

  typedef logic signed [NS-1:0] metric_t;
  typedef metric_t [Q-1:0]      metric_vec_t;
  typedef logic signed [NE-1:0] ext_t;
  typedef logic signed [NI-1:0] chan_t;
  typedef logic signed [NG-1:0] gamma_t;

  // Branch metrics of the four edge labels, indexed by {u,p}.
  typedef gamma_t [3:0] gamma_vec_t;

  // Source of the first forward metrics of a window (eq. (6) and (7)).
  typedef enum logic [1:0] {
    AINIT_FRESH     = 2'd0,  // alpha at the end of the previous window, just computed
    AINIT_SHAT      = 2'd1,  // previous window skipped: saturated metrics around s_hat
    AINIT_NEIGHBOUR = 2'd2,  // first window: inherited from the neighbouring SISO
    AINIT_START     = 2'd3   // first window of the frame: encoder start state 0
  } alpha_init_e;

  // Most negative state metric: the saturation value of eq. (7).
  localparam metric_t METRIC_MIN = metric_t'(-(2 ** (NS - 1)));

  function automatic logic [QB-1:0] next_state(input logic [QB-1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [QB-1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Predecessor of state s reached with input u (forward recursion). The
  // feedback bit equals s[2]; s1,s2 of the predecessor are s[1],s[0] and its s3
  // follows from a = u ^ s2 ^ s3.
  function automatic logic [QB-1:0] prev_state(input logic [QB-1:0] s, input logic u);
    logic s3;
    s3 = s[2] ^ u ^ s[0];
    return {s[1], s[0], s3};
  endfunction

  // Metric vector with state 0 certain: the start state of both encoders.
  function automatic metric_vec_t known_state0();
    metric_vec_t v;
    for (int s = 0; s < Q; s++) v[s] = (s == 0) ? metric_t'(0) : METRIC_MIN;
    return v;
  endfunction

endpackage
