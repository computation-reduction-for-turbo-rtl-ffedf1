// tb_turbo_decoder: end-to-end test of the window-skipping turbo decoder at a
// reduced frame size (N=256, P=4 SISOs, W=8, 8 iterations).
//
// The testbench has its own LTE encoder (two 8-state RSC encoders, QPP
// interleaver) and a BPSK/AWGN channel with 5-bit LLR quantisation. It decodes
// five frames and checks every decoded bit against the transmitted bits:
//   A noiseless frame, skipping on      -> whole slots are skipped
//   B noiseless in SISO 0's sub-frame, noisy elsewhere, skipping on
//                                          -> single SISOs skip, s_hat init
//   C the noisy frame of B, skipping off -> no skip, exact cycle count
//   D noisy frame, skipping on, theta=10
//   E low-SNR frame (sigma 0.9) that needs both constituent decoders
// Each mechanism (a slot skipped by every SISO, a window skipped by only some
// SISOs, a window initialised from s_hat, a frame decoded with skipping off)
// is counted, and a mechanism that never occurred counts as a failure. The
// number of windows computed plus skipped and the cycle count are checked for
// every frame.
module tb_turbo_decoder;
  localparam int N    = 256;
  localparam int P    = 4;
  localparam int W    = 8;
  localparam int ITER = 8;
  localparam int F1   = 15;
  localparam int F2   = 32;
  localparam int M    = N / P;
  localparam int MW   = M / W;
  localparam int KB   = $clog2(N);
  localparam real SIG_E = 0.9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, start = 1'b0, skip_en = 1'b0, out_en = 1'b0;
  logic [KB-1:0] in_k = '0, out_k = '0;
  logic signed [4:0] in_sys = '0, in_par1 = '0, in_par2 = '0;
  logic [7:0] theta = 8'd10;
  logic busy, done, out_bit;
  logic [31:0] cnt_cycles, cnt_win_done, cnt_win_skip, cnt_slot_skip, cnt_shat_init;

  always #5 clk = ~clk;

  turbo_decoder #(.N(N), .P(P), .W(W), .ITER(ITER), .F1(F1), .F2(F2)) dut (.*);

  int checks = 0, failures = 0;
  int n_slot_skip = 0, n_part_skip = 0, n_shat = 0, n_noskip_frames = 0;

  bit            u   [N];
  int            ys  [N], yp1 [N], yp2 [N];

  function automatic int qpp(int k);
    longint kk = longint'(k);
    return int'((longint'(F1) * kk + longint'(F2) * kk * kk) % longint'(N));
  endfunction

  // Gaussian sample, approximately N(0,1): sum of 12 uniforms minus 6.
  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 65535)) / 65536.0;
    return acc - 6.0;
  endfunction

  // BPSK (bit 1 -> +1), noise sigma, LLR = round(4*y) clamped to 5 bits.
  function automatic int chan(bit b, real sigma);
    real y;
    int  q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = int'($floor(4.0 * y + 0.5));
    if (q > 15) q = 15;
    if (q < -16) q = -16;
    return q;
  endfunction

  task automatic make_frame(real sigma_first, real sigma_rest);
    bit r1, r2, r3, fb;
    bit p1 [N];
    bit p2 [N];
    real sg;
    for (int k = 0; k < N; k++) u[k] = 1'($urandom_range(0, 1));
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      fb = u[k] ^ r2 ^ r3;  p1[k] = fb ^ r1 ^ r3;  r3 = r2; r2 = r1; r1 = fb;
    end
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      fb = u[qpp(k)] ^ r2 ^ r3;  p2[k] = fb ^ r1 ^ r3;  r3 = r2; r2 = r1; r1 = fb;
    end
    // Channel noise: sub-frame 0 (natural order) gets sigma_first.
    for (int k = 0; k < N; k++) begin
      sg = (k < M) ? sigma_first : sigma_rest;
      ys[k]  = chan(u[k], sg);
      yp1[k] = chan(p1[k], sg);
      yp2[k] = chan(p2[k], (qpp(k) < M) ? sigma_first : sigma_rest);
    end
  endtask

  task automatic load_frame();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_k = KB'(k);
      in_sys = 5'(ys[k]); in_par1 = 5'(yp1[k]); in_par2 = 5'(yp2[k]);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic decode(bit en, string name, bit expect_exact_cycles);
    int errs = 0;
    skip_en = en;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      out_en = 1'b1; out_k = KB'(k);
      @(negedge clk);
      if (out_bit !== u[k]) errs++;
    end
    out_en = 1'b0;
    checks++;
    if (errs != 0) begin
      failures++;
      $display("FAIL %s: %0d bit errors", name, errs);
    end
    $display("%s: errors=%0d cycles=%0d windows done=%0d skipped=%0d slots skipped=%0d shat inits=%0d",
             name, errs, cnt_cycles, cnt_win_done, cnt_win_skip, cnt_slot_skip, cnt_shat_init);
    checks++;
    if (cnt_win_done + cnt_win_skip != 32'(2 * ITER * MW * P)) begin
      failures++;
      $display("FAIL %s: window accounting %0d + %0d", name, cnt_win_done, cnt_win_skip);
    end
    // Cycle count: 1 clear cycle, 2W+3 per computed slot, 1 per skipped slot.
    checks++;
    if (cnt_cycles != 32'(1 + (2 * ITER * MW - cnt_slot_skip) * (2 * W + 3) + cnt_slot_skip)) begin
      failures++;
      $display("FAIL %s: cycle count %0d", name, cnt_cycles);
    end
    if (expect_exact_cycles) begin
      checks++;
      if (cnt_win_skip != 0 || cnt_cycles != 32'(1 + 2 * ITER * MW * (2 * W + 3))) begin
        failures++;
        $display("FAIL %s: skipping off but %0d windows skipped", name, cnt_win_skip);
      end else n_noskip_frames++;
    end
    if (cnt_slot_skip > 0) n_slot_skip++;
    if (cnt_win_skip > cnt_slot_skip * P) n_part_skip++;
    if (cnt_shat_init > 0) n_shat++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // A: noiseless frame
    make_frame(0.0, 0.0);
    load_frame();
    decode(1'b1, "A noiseless, skip on", 1'b0);
    // B/C: clean first sub-frame, noisy rest
    make_frame(0.0, 0.75);
    load_frame();
    decode(1'b1, "B mixed, skip on", 1'b0);
    load_frame();
    decode(1'b0, "C mixed, skip off", 1'b1);
    // D: uniformly noisy frame
    make_frame(0.6, 0.6);
    load_frame();
    decode(1'b1, "D noisy, skip on", 1'b0);
    // E: low SNR frame; needs both constituent decoders
    make_frame(SIG_E, SIG_E);
    load_frame();
    decode(1'b1, "E low SNR, skip on", 1'b0);

    $display("mechanisms: slot-skip frames=%0d partial-skip frames=%0d shat-init frames=%0d no-skip frames=%0d",
             n_slot_skip, n_part_skip, n_shat, n_noskip_frames);
    checks++; if (n_slot_skip == 0)     begin failures++; $display("FAIL: no slot skipped"); end
    checks++; if (n_part_skip == 0)     begin failures++; $display("FAIL: no partial skip"); end
    checks++; if (n_shat == 0)          begin failures++; $display("FAIL: no s_hat init"); end
    checks++; if (n_noskip_frames == 0) begin failures++; $display("FAIL: no skip-off frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
