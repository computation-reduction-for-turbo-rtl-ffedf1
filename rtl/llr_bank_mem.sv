// llr_bank_mem: one frame memory of the parallel decoder, split into BANKS
// single-port banks of DEPTH words so that the P SISOs can each read or write
// one word per clock cycle. The decoder uses it for the systematic LLRs, the
// parity LLRs and the extrinsic LLRs with the hard decisions. Each bank has its
// own enable, write enable and address; reads are synchronous (data one cycle
// after the enable), as in an SRAM macro. The bank organisation (one bank per
// SISO) and the synchronous read are choices of this implementation.
module llr_bank_mem #(
  parameter int BANKS = 8,
  parameter int DEPTH = 768,
  parameter int WIDTH = 8
) (
  input  logic                                   clk,
  input  logic [BANKS-1:0]                       en,
  input  logic [BANKS-1:0]                       we,
  input  logic [BANKS-1:0][$clog2(DEPTH)-1:0]    addr,
  input  logic [BANKS-1:0][WIDTH-1:0]            wdata,
  output logic [BANKS-1:0][WIDTH-1:0]            rdata
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (en[b]) begin
        if (we[b]) mem[addr[b]] <= wdata[b];
        else       rdata[b]     <= mem[addr[b]];
      end
    end
  end
endmodule
