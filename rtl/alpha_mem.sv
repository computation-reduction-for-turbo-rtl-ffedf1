// alpha_mem: state-metric memory of one SISO.
//
// The forward recursion of a window writes alpha_l (the metrics entering
// trellis step l, l = 0..W-1) at address l; the backward recursion that follows
// reads them back in reverse order to form the LLRs. One window of Q metrics of
// n_s bits per step: W*Q*n_s = 3072 bits per SISO at the reference sizes,
// 24.6 kbits for P = 8 SISOs. Written on the clock edge, read asynchronously
// (a register file); the asynchronous read is a choice of this implementation.
module alpha_mem
  import tdec_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(W)-1:0] waddr,
  input  metric_vec_t          wdata,
  input  logic [$clog2(W)-1:0] raddr,
  output metric_vec_t          rdata
);
  metric_vec_t mem [W];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
