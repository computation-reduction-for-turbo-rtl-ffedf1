// siso: sliding-window Max-Log-MAP soft-in soft-out decoder with border-metric
// inheritance and window skipping.
//
// The SISO owns M_W windows of W trellis steps of the current constituent code
// and works through them one window at a time, in lockstep with the other SISOs
// under a common controller. For each window:
//   win_start  the controller asks for window win_j. If the window's skip flag
//              sigma (set by an earlier iteration) is 1 and skipping is
//              enabled, the SISO stays idle for the whole window (active=0):
//              no memory reads, no recursion, no writes. Otherwise alpha is
//              initialised by eq. (6)/(7) (alpha_init_mux) and beta from the
//              backward-border memory (entry j+1, or entry 0 of the
//              neighbouring SISO for the last window, or all-equal metrics at
//              the end of the frame).
//   forward    W cycles of fwd_valid: the step's LLRs are buffered, alpha_l is
//              stored in the state-metric memory and the forward recursion
//              advances. The a-priori LLRs go to the skip detector.
//   backward   W cycles of bwd_valid, l = W-1 down to 0: the LLR unit combines
//              alpha_l, the step's branch metrics and beta_{l+1} into the
//              extrinsic LLR and hard decision (ext_valid, same cycle), and the
//              backward recursion advances. The extrinsic LLRs go to the skip
//              detector.
//   slot_skip  every SISO skips window win_j; the slot is dropped and only
//              the fact that the window was skipped is recorded.
//   win_end    beta_0 is written to the border memory (entry j); s_hat, the best
//              end-of-window state, and the new sigma are written to the
//              status memory; after the last window alpha_W is kept for the
//              neighbouring SISO.
// A skipped window writes nothing, so its neighbours inherit older border
// values (intra-SISO forward borders through s_hat, eq. (7)). The shared
// branch metric unit serves both passes, which never overlap. The window
// schedule (forward pass, then backward pass, no overlap) and the local input
// buffer are choices of this implementation; IS_FIRST/IS_LAST mark the SISOs
// holding the start and the end of the frame.
module siso
  import tdec_pkg::*;
#(
  parameter int W        = 32,
  parameter int MW       = 24,
  parameter bit IS_FIRST = 1'b0,
  parameter bit IS_LAST  = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_clear,  // new frame: forget all inherited state
  input  logic [7:0]            theta,
  input  logic                  skip_en,
  input  logic                  half,         // 0: first constituent code, 1: second
  input  logic [$clog2(MW)-1:0] win_j,
  output logic                  skip_req,     // window win_j will be skipped
  input  logic                  win_start,
  input  logic                  fwd_valid,
  input  logic [$clog2(W)-1:0]  fwd_l,
  input  chan_t                 sys_llr,
  input  chan_t                 par_llr,
  input  ext_t                  apr_llr,
  input  logic                  bwd_valid,
  input  logic [$clog2(W)-1:0]  bwd_l,
  input  logic                  win_end,
  input  logic                  slot_skip,    // every SISO skips window win_j
  output logic                  active,       // processing the current window
  output logic                  shat_init,    // this window starts from s_hat (eq. (7))
  output logic                  ext_valid,
  output ext_t                  ext_llr,
  output logic                  hard,
  input  metric_vec_t           alpha_left_in,  // from SISO i-1
  output metric_vec_t           alpha_out,      // to SISO i+1
  input  metric_vec_t           beta_right_in,  // from SISO i+1
  output metric_vec_t           beta_out        // to SISO i-1
);
  localparam int JB = $clog2(MW);

  typedef struct packed {
    chan_t sys;
    chan_t par;
    ext_t  apr;
  } step_in_t;

  logic          act_q, prev_skipped_q;
  metric_vec_t   alpha_q, beta_q, alpha_next, beta_next, alpha0, alpha_l, border_rd;
  metric_vec_t   alpha_out_q [2];
  step_in_t      inbuf [W];
  step_in_t      cur;
  gamma_vec_t    g;
  alpha_init_e   init_sel;
  logic          sigma_stored, sigma_acc;
  logic [QB-1:0] shat_prev, shat_now;
  logic          last_win;

  assign last_win = (win_j == JB'(MW - 1));

  // ---------------------------------------------------------------- status
  window_status_mem #(.MW(MW)) u_status (
    .clk, .rst_n, .clear(frame_clear),
    .we(win_end && act_q), .half, .wj(win_j), .wsigma(sigma_acc), .wshat(shat_now),
    .ja(win_j), .sigma_a(sigma_stored),
    .jb(win_j - JB'(1)), .shat_b(shat_prev)
  );

  assign skip_req = skip_en && sigma_stored;

  // ---------------------------------------------------------------- alpha init
  always_comb begin
    if (win_j == '0)         init_sel = IS_FIRST ? AINIT_START : AINIT_NEIGHBOUR;
    else if (prev_skipped_q) init_sel = AINIT_SHAT;
    else                     init_sel = AINIT_FRESH;
  end

  alpha_init_mux u_ainit (
    .sel(init_sel), .fresh(alpha_q), .neighbour(alpha_left_in), .shat(shat_prev),
    .alpha0
  );

  // ---------------------------------------------------------------- branch metrics
  always_comb begin
    if (bwd_valid) cur = inbuf[bwd_l];
    else           cur = '{sys: sys_llr, par: par_llr, apr: apr_llr};
  end

  bmu u_bmu (.sys_llr(cur.sys), .par_llr(cur.par), .apr_llr(cur.apr), .g);

  // ---------------------------------------------------------------- recursions
  acs_unit #(.FORWARD(1'b1)) u_fwd (.m_in(alpha_q), .g, .m_out(alpha_next));
  acs_unit #(.FORWARD(1'b0)) u_bwd (.m_in(beta_q),  .g, .m_out(beta_next));

  alpha_mem #(.W(W)) u_amem (
    .clk, .we(fwd_valid && act_q), .waddr(fwd_l), .wdata(alpha_q),
    .raddr(bwd_l), .rdata(alpha_l)
  );

  beta_border_mem #(.MW(MW)) u_bmem (
    .clk, .rst_n, .clear(frame_clear),
    .we(win_end && act_q), .whalf(half), .wj(win_j), .wdata(beta_q),
    .rhalf(half), .rj(last_win ? win_j : win_j + JB'(1)), .rdata(border_rd),
    .entry0(beta_out)
  );

  state_argmax u_argmax (.m(alpha_q), .idx(shat_now));

  llr_unit u_llr (.alpha(alpha_l), .beta(beta_q), .g, .ext_llr, .hard);

  skip_detector u_skip (
    .clk, .rst_n, .clear(win_start), .theta,
    .apr_valid(fwd_valid && act_q), .apr_llr,
    .ext_valid(bwd_valid && act_q), .ext_llr,
    .sigma(sigma_acc)
  );

  always_ff @(posedge clk) begin
    if (fwd_valid && act_q) inbuf[fwd_l] <= '{sys: sys_llr, par: par_llr, apr: apr_llr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q          <= 1'b0;
      prev_skipped_q <= 1'b0;
      alpha_q        <= '0;
      beta_q         <= '0;
      alpha_out_q    <= '{default: '0};
    end else if (frame_clear) begin
      act_q          <= 1'b0;
      prev_skipped_q <= 1'b0;
      alpha_out_q    <= '{default: '0};
    end else begin
      if (win_start) begin
        act_q <= !skip_req;
        if (!skip_req) begin
          alpha_q <= alpha0;
          if (!last_win)    beta_q <= border_rd;
          else if (IS_LAST) beta_q <= '0;
          else              beta_q <= beta_right_in;
        end
      end
      if (fwd_valid && act_q) alpha_q <= alpha_next;
      if (bwd_valid && act_q) beta_q  <= beta_next;
      if (slot_skip) prev_skipped_q <= 1'b1;
      if (win_end) begin
        prev_skipped_q <= !act_q;
        if (act_q && last_win) alpha_out_q[half] <= alpha_q;
        act_q <= 1'b0;
      end
    end
  end

  assign alpha_out = alpha_out_q[half];
  assign active    = act_q;
  assign shat_init = win_start && !skip_req && (init_sel == AINIT_SHAT);
  assign ext_valid = bwd_valid && act_q;

  // The controller never overlaps the two passes.
  assert property (@(posedge clk) disable iff (!rst_n) !(fwd_valid && bwd_valid));

endmodule
