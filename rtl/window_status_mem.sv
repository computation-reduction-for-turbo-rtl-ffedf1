// window_status_mem: per-window status of one SISO for the window-skipping
// technique.
//
// For every window j and each constituent code it holds the skip flag sigma
// (eq. (5)) and s_hat, the index of the best state at the end of the window
// (eq. (7)). log2(Q) bits of s_hat per window give 576 bits for the whole
// decoder at the reference sizes (M_W = 24, P = 8); sigma adds one bit per
// window. A window that is skipped is not written again, so once sigma is set
// it stays set until clear (start of a frame). Port A reads sigma of the window
// about to be processed, port B s_hat of the window before it. Synchronous
// write and clear, asynchronous reads.
module window_status_mem
  import tdec_pkg::*;
#(
  parameter int MW = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  we,
  input  logic                  half,
  input  logic [$clog2(MW)-1:0] wj,
  input  logic                  wsigma,
  input  logic [QB-1:0]         wshat,
  input  logic [$clog2(MW)-1:0] ja,
  output logic                  sigma_a,
  input  logic [$clog2(MW)-1:0] jb,
  output logic [QB-1:0]         shat_b
);
  logic          sigma_q [2][MW];
  logic [QB-1:0] shat_q  [2][MW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < MW; j++) begin
          sigma_q[h][j] <= 1'b0;
          shat_q[h][j]  <= '0;
        end
    end else if (clear) begin
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < MW; j++) begin
          sigma_q[h][j] <= 1'b0;
          shat_q[h][j]  <= '0;
        end
    end else if (we) begin
      sigma_q[half][wj] <= wsigma;
      shat_q[half][wj]  <= wshat;
    end
  end

  assign sigma_a = sigma_q[half][ja];
  assign shat_b  = shat_q[half][jb];
endmodule
