// turbo_decoder: parallel LTE turbo decoder with window skipping.
//
// P Max-Log-MAP SISOs decode a frame of N trellis steps; SISO i owns the
// sub-frame k = i*M .. i*M+M-1 (M = N/P), split into M_W = M/W windows of W
// steps. Each iteration consists of two half iterations, one per constituent
// code: the first in natural order, the second in QPP-interleaved order. The
// extrinsic LLRs of one half iteration are the a-priori LLRs of the next and
// live in a single P-bank memory in natural order; in the second half
// iteration SISO i reaches bank floor(pi(i*M+t)/M) at offset pi(t) mod M, a
// conflict-free permutation, through a P x P bank network. Border-metric
// inheritance initialises the recursions of each window; windows whose a-priori
// and extrinsic LLRs all reached the threshold theta are skipped in later
// iterations (see siso). A slot that every SISO skips costs one cycle; a
// partly skipped slot leaves the skipping SISOs and their memory banks idle.
//
// Interface
//   load    (busy=0) in_valid writes step in_k: systematic, parity-1 and
//           parity-2 channel LLRs (par2 is the parity of interleaved step
//           in_k). It also clears the extrinsic LLR of step in_k, so every
//           step of a frame must be loaded before start.
//   decode  start (one cycle) runs ITER iterations; busy is high meanwhile and
//           done pulses at the end. theta and skip_en must stay stable.
//   read    (busy=0) out_en with out_k returns the hard decision of
//           information bit out_k on out_bit one cycle later.
//   counters (cleared by start): cnt_cycles decoding cycles, cnt_win_done
//           windows computed, cnt_win_skip windows skipped, cnt_slot_skip slots
//           skipped by all SISOs, cnt_shat_init windows started from s_hat.
// The frame is taken as not terminated (no tail bits): the backward recursion
// at the end of the frame starts from equal metrics. The load/read interface,
// the counters and the termination are choices of this implementation.
module turbo_decoder
  import tdec_pkg::*;
#(
  parameter int N    = 6144,
  parameter int P    = 8,
  parameter int W    = 32,
  parameter int ITER = 8,
  parameter int F1   = 263,
  parameter int F2   = 480
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_k,
  input  chan_t                in_sys,
  input  chan_t                in_par1,
  input  chan_t                in_par2,
  input  logic                 start,
  input  logic [7:0]           theta,
  input  logic                 skip_en,
  output logic                 busy,
  output logic                 done,
  input  logic                 out_en,
  input  logic [$clog2(N)-1:0] out_k,
  output logic                 out_bit,
  output logic [31:0]          cnt_cycles,
  output logic [31:0]          cnt_win_done,
  output logic [31:0]          cnt_win_skip,
  output logic [31:0]          cnt_slot_skip,
  output logic [31:0]          cnt_shat_init
);
  localparam int M  = N / P;
  localparam int MW = M / W;
  localparam int KB = $clog2(N);
  localparam int AB = $clog2(M);
  localparam int PB = (P > 1) ? $clog2(P) : 1;
  localparam int JB = $clog2(MW);
  localparam int LB = $clog2(W);

  // ------------------------------------------------------------ controller
  logic                    frame_clear, half, win_start, slot_skip, rd_en;
  logic                    fwd_valid, bwd_valid, win_end;
  logic [$clog2(ITER > 1 ? ITER : 2)-1:0] iter;
  logic [JB-1:0]           win_j;
  logic [LB-1:0]           rd_l, fwd_l, bwd_l;
  logic [P-1:0]            skip_req, active, shat_init, ext_valid, hard;
  ext_t                    ext_llr [P];
  chan_t                   s_sys [P], s_par [P];
  ext_t                    s_apr [P];

  turbo_ctrl #(.P(P), .W(W), .MW(MW), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .start, .skip_req, .busy, .done, .frame_clear, .half, .iter,
    .win_j, .win_start, .slot_skip, .rd_en, .rd_l, .fwd_valid, .fwd_l,
    .bwd_valid, .bwd_l, .win_end
  );

  // ------------------------------------------------------------ addresses
  // Step t = j*W + l of the current window slot, the same for all SISOs.
  logic [AB-1:0]         t_loc, a_int;
  logic [KB-1:0]         pi_k [P];
  logic [P-1:0][PB-1:0]  perm, perm_q;   // bank reached by SISO i
  logic                  half_q;

  assign t_loc = AB'(win_j) * AB'(W) + AB'(rd_en ? rd_l : bwd_l);

  for (genvar i = 0; i < P; i++) begin : g_pi
    qpp_interleaver #(.N(N), .F1(F1), .F2(F2)) u_pi (
      .k(KB'(i * M) + KB'(t_loc)), .pi(pi_k[i])
    );
    assign perm[i] = half ? PB'(pi_k[i] / KB'(M)) : PB'(i);
  end
  assign a_int = AB'(pi_k[0] % KB'(M));

  // ------------------------------------------------------------ frame memories
  logic [P-1:0]                 sys_en, sys_we, par_en, par_we, ext_en, ext_we;
  logic [P-1:0][AB-1:0]         sys_addr, par_addr, ext_addr;
  logic [P-1:0][NI-1:0]         sys_wd, sys_rd;
  logic [P-1:0][2*NI-1:0]       par_wd, par_rd;
  logic [P-1:0][NE:0]           ext_wd, ext_rd;   // {hard, ext}
  logic [PB-1:0]                in_bank, out_bank, out_bank_q;
  logic [AB-1:0]                in_addr, out_addr;

  assign in_bank  = PB'(in_k / KB'(M));
  assign in_addr  = AB'(in_k % KB'(M));
  assign out_bank = PB'(out_k / KB'(M));
  assign out_addr = AB'(out_k % KB'(M));

  always_comb begin
    sys_en = '0; sys_we = '0; sys_addr = '0; sys_wd = '0;
    par_en = '0; par_we = '0; par_addr = '0; par_wd = '0;
    ext_en = '0; ext_we = '0; ext_addr = '0; ext_wd = '0;
    if (busy) begin
      for (int i = 0; i < P; i++) begin
        // Parity LLRs are stored in the order of their own code.
        par_en[i]   = rd_en && active[i];
        par_addr[i] = t_loc;
        sys_addr[i] = half ? a_int : t_loc;
        ext_addr[i] = half ? a_int : t_loc;
      end
      for (int i = 0; i < P; i++) begin
        if (rd_en && active[i]) begin
          sys_en[perm[i]] = 1'b1;
          ext_en[perm[i]] = 1'b1;
        end
        if (ext_valid[i]) begin
          ext_en[perm[i]] = 1'b1;
          ext_we[perm[i]] = 1'b1;
          ext_wd[perm[i]] = {hard[i], ext_llr[i]};
        end
      end
    end else begin
      if (in_valid) begin
        sys_en[in_bank] = 1'b1;  sys_we[in_bank] = 1'b1;
        par_en[in_bank] = 1'b1;  par_we[in_bank] = 1'b1;
        ext_en[in_bank] = 1'b1;  ext_we[in_bank] = 1'b1;
        sys_addr[in_bank] = in_addr;
        par_addr[in_bank] = in_addr;
        ext_addr[in_bank] = in_addr;
        sys_wd[in_bank] = in_sys;
        par_wd[in_bank] = {in_par2, in_par1};
        ext_wd[in_bank] = {in_sys > 0, NE'(0)};
      end else if (out_en) begin
        ext_en[out_bank]   = 1'b1;
        ext_addr[out_bank] = out_addr;
      end
    end
  end

  llr_bank_mem #(.BANKS(P), .DEPTH(M), .WIDTH(NI)) u_sys_mem (
    .clk, .en(sys_en), .we(sys_we), .addr(sys_addr), .wdata(sys_wd), .rdata(sys_rd));
  llr_bank_mem #(.BANKS(P), .DEPTH(M), .WIDTH(2*NI)) u_par_mem (
    .clk, .en(par_en), .we(par_we), .addr(par_addr), .wdata(par_wd), .rdata(par_rd));
  llr_bank_mem #(.BANKS(P), .DEPTH(M), .WIDTH(NE+1)) u_ext_mem (
    .clk, .en(ext_en), .we(ext_we), .addr(ext_addr), .wdata(ext_wd), .rdata(ext_rd));

  always_ff @(posedge clk) begin
    perm_q     <= perm;
    half_q     <= half;
    out_bank_q <= out_bank;
  end

  assign out_bit = ext_rd[out_bank_q][NE];

  // Read data back to the SISOs through the bank network.
  always_comb begin
    for (int i = 0; i < P; i++) begin
      s_sys[i] = chan_t'(sys_rd[perm_q[i]]);
      s_apr[i] = ext_t'(ext_rd[perm_q[i]][NE-1:0]);
      s_par[i] = half_q ? chan_t'(par_rd[i][2*NI-1:NI]) : chan_t'(par_rd[i][NI-1:0]);
    end
  end

  // ------------------------------------------------------------ SISOs
  metric_vec_t alpha_out [P], beta_out [P];

  for (genvar i = 0; i < P; i++) begin : g_siso
    siso #(.W(W), .MW(MW), .IS_FIRST(i == 0), .IS_LAST(i == P - 1)) u_siso (
      .clk, .rst_n, .frame_clear, .theta, .skip_en, .half, .win_j,
      .skip_req(skip_req[i]), .win_start, .fwd_valid, .fwd_l,
      .sys_llr(s_sys[i]), .par_llr(s_par[i]), .apr_llr(s_apr[i]),
      .bwd_valid, .bwd_l, .win_end, .slot_skip,
      .active(active[i]), .shat_init(shat_init[i]),
      .ext_valid(ext_valid[i]), .ext_llr(ext_llr[i]), .hard(hard[i]),
      .alpha_left_in(alpha_out[(i + P - 1) % P]), .alpha_out(alpha_out[i]),
      .beta_right_in(beta_out[(i + 1) % P]), .beta_out(beta_out[i])
    );
  end

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cycles    <= '0;
      cnt_win_done  <= '0;
      cnt_win_skip  <= '0;
      cnt_slot_skip <= '0;
      cnt_shat_init <= '0;
    end else if (start && !busy) begin
      cnt_cycles    <= '0;
      cnt_win_done  <= '0;
      cnt_win_skip  <= '0;
      cnt_slot_skip <= '0;
      cnt_shat_init <= '0;
    end else begin
      if (busy) cnt_cycles <= cnt_cycles + 32'd1;
      if (win_end) begin
        cnt_win_done <= cnt_win_done + 32'($countones(active));
        cnt_win_skip <= cnt_win_skip + 32'(P - $countones(active));
      end
      if (slot_skip) begin
        cnt_win_skip  <= cnt_win_skip + 32'(P);
        cnt_slot_skip <= cnt_slot_skip + 32'd1;
      end
      cnt_shat_init <= cnt_shat_init + 32'($countones(shat_init));
    end
  end

  // The QPP interleaver must give every SISO the same bank offset.
  for (genvar i = 1; i < P; i++) begin : g_cf
    assert property (@(posedge clk) disable iff (!rst_n)
      (busy && half) |-> (pi_k[i] % KB'(M)) == (pi_k[0] % KB'(M)));
  end

  logic unused;
  assign unused = ^iter;

endmodule
