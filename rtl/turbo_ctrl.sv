// turbo_ctrl: schedule of the parallel turbo decoder.
//
// After start the controller clears the inherited state of the SISOs
// (frame_clear) and runs ITER iterations of two half iterations each (half=0:
// first constituent code in natural order, half=1: second code in interleaved
// order). A half iteration visits the window slots j = 0..MW-1; all P SISOs
// work on window j of their own sub-frame at the same time. For each slot:
//   SLOT   if every SISO reports that its window j is to be skipped the slot is
//          dropped after this single cycle (slot_skip); otherwise win_start.
//   READ   W cycles of rd_en, rd_l = 0..W-1 (frame memory addresses); the
//          memories answer one cycle later, so fwd_valid/fwd_l are rd_en/rd_l
//          delayed by one cycle.
//   DRAIN  one cycle for the last forward step.
//   BWD    W cycles of bwd_valid, bwd_l = W-1..0.
//   END    win_end.
// A computed slot therefore takes 2W+3 cycles and a skipped slot 1 cycle;
// done pulses one cycle after the last slot of the last half iteration.
// The lockstep schedule and the slot timing are choices of this implementation.
module turbo_ctrl #(
  parameter int P    = 8,
  parameter int W    = 32,
  parameter int MW   = 24,
  parameter int ITER = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [P-1:0]          skip_req,
  output logic                  busy,
  output logic                  done,
  output logic                  frame_clear,
  output logic                  half,
  output logic [$clog2(ITER > 1 ? ITER : 2)-1:0] iter,
  output logic [$clog2(MW)-1:0] win_j,
  output logic                  win_start,
  output logic                  slot_skip,
  output logic                  rd_en,
  output logic [$clog2(W)-1:0]  rd_l,
  output logic                  fwd_valid,
  output logic [$clog2(W)-1:0]  fwd_l,
  output logic                  bwd_valid,
  output logic [$clog2(W)-1:0]  bwd_l,
  output logic                  win_end
);
  localparam int JB = $clog2(MW);
  localparam int LB = $clog2(W);
  localparam int IB = $clog2(ITER > 1 ? ITER : 2);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_SLOT, S_READ, S_DRAIN, S_BWD, S_END} state_e;

  state_e        state;
  logic [LB-1:0] l_q;
  logic          last_slot;

  assign last_slot = (win_j == JB'(MW - 1)) && half && (iter == IB'(ITER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      l_q       <= '0;
      win_j     <= '0;
      half      <= 1'b0;
      iter      <= '0;
      done      <= 1'b0;
      fwd_valid <= 1'b0;
      fwd_l     <= '0;
    end else begin
      done      <= 1'b0;
      fwd_valid <= rd_en;
      fwd_l     <= rd_l;
      unique case (state)
        S_IDLE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          win_j <= '0;
          half  <= 1'b0;
          iter  <= '0;
          state <= S_SLOT;
        end
        S_SLOT: begin
          l_q <= '0;
          if (&skip_req) begin
            if (last_slot) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_SLOT;
            end
            if (win_j == JB'(MW - 1)) begin
              win_j <= '0;
              half  <= !half;
              if (half) iter <= iter + IB'(1);
            end else begin
              win_j <= win_j + JB'(1);
            end
          end else begin
            state <= S_READ;
          end
        end
        S_READ: begin
          l_q <= l_q + LB'(1);
          if (l_q == LB'(W - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          l_q   <= LB'(W - 1);
          state <= S_BWD;
        end
        S_BWD: begin
          l_q <= l_q - LB'(1);
          if (l_q == '0) state <= S_END;
        end
        S_END: begin
          if (last_slot) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_SLOT;
          end
          if (win_j == JB'(MW - 1)) begin
            win_j <= '0;
            half  <= !half;
            if (half) iter <= iter + IB'(1);
          end else begin
            win_j <= win_j + JB'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy        = (state != S_IDLE);
  assign frame_clear = (state == S_CLEAR);
  assign win_start   = (state == S_SLOT) && !(&skip_req);
  assign slot_skip   = (state == S_SLOT) && (&skip_req);
  assign rd_en       = (state == S_READ);
  assign rd_l        = l_q;
  assign bwd_valid   = (state == S_BWD);
  assign bwd_l       = l_q;
  assign win_end     = (state == S_END);
endmodule
