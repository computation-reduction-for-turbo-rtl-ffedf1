// beta_border_mem: backward-border-metric memory of one SISO.
//
// Border-metric inheritance: at the end of the backward recursion of window j
// the metrics beta_{j,0} are written at entry j. At the next iteration they
// initialise the backward recursion of window j-1; entry 0 initialises the last
// window of the neighbouring SISO and is therefore brought out separately.
// A skipped window does not write, so its neighbours inherit the older values.
// Each constituent code (half iteration) keeps its own set of M_W entries;
// clear resets all entries to 0 (all states equally likely) at the start of a
// frame. Q*n_s*M_W bits per set per SISO (18.4 kbits for P = 8 at the
// reference sizes). Synchronous write and clear, asynchronous reads.
module beta_border_mem
  import tdec_pkg::*;
#(
  parameter int MW = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  we,
  input  logic                  whalf,
  input  logic [$clog2(MW)-1:0] wj,
  input  metric_vec_t           wdata,
  input  logic                  rhalf,
  input  logic [$clog2(MW)-1:0] rj,
  output metric_vec_t           rdata,
  output metric_vec_t           entry0   // entry 0 of half rhalf
);
  metric_vec_t mem [2][MW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < MW; j++) mem[h][j] <= '0;
    end else if (clear) begin
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < MW; j++) mem[h][j] <= '0;
    end else if (we) begin
      mem[whalf][wj] <= wdata;
    end
  end

  assign rdata  = mem[rhalf][rj];
  assign entry0 = mem[rhalf][0];
endmodule
