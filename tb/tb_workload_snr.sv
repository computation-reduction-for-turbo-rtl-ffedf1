// tb_workload_snr: the evaluation workload of the window-skipping decoder at
// its reference configuration (every parameter at its default: N=6144, P=8,
// W=32, 8 iterations). Random frames are sent over a BPSK/AWGN channel at
// Eb/N0 = 1.2, 1.5 and 1.8 dB (code rate 1/3). The channel LLRs 2y/sigma^2
// are quantised to 5 bits twice over: as integers (LLR step 1) and with one
// fractional bit (LLR step 1/2), which shows how strongly the share of skipped
// windows depends on the scaling of the channel LLRs. Each frame is decoded with skipping off and
// with theta = 4, 8, 10 and 11; the bit errors and the share of skipped
// windows are printed. Checks:
//   - theta = 10 and 11 cost no more than 0.1% extra bit errors over skipping
//     off (the no-degradation region),
//   - at theta = 10 the share of skipped windows does not fall with SNR,
//   - a lower threshold never skips fewer windows in total than a higher one,
//   - with skipping off nothing is skipped.
module tb_workload_snr;
  localparam int N = 6144, M = 768, KB = 13, FR = 2;
  localparam real EBN0 [3] = '{1.2, 1.5, 1.8};
  localparam int  THETA [4] = '{4, 8, 10, 11};
  localparam real SCALE [2] = '{1.0, 2.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, start = 1'b0, skip_en = 1'b0, out_en = 1'b0;
  logic [KB-1:0] in_k = '0, out_k = '0;
  logic signed [4:0] in_sys = '0, in_par1 = '0, in_par2 = '0;
  logic [7:0] theta = 8'd10;
  logic busy, done, out_bit;
  logic [31:0] cnt_cycles, cnt_win_done, cnt_win_skip, cnt_slot_skip, cnt_shat_init;

  always #5 clk = ~clk;

  turbo_decoder dut (.*);

  int checks = 0, failures = 0;
  bit u [N];
  int ys [N], yp1 [N], yp2 [N];
  int err_off [3], err_th [3][4], skip_th [3][4], wins_th [3][4];

  function automatic int qpp(int k);
    longint kk = longint'(k);
    return int'((263 * kk + 480 * kk * kk) % longint'(N));
  endfunction

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 65535)) / 65536.0;
    return acc - 6.0;
  endfunction

  function automatic int chan(bit b, real sigma, real scale);
    real y;
    int  q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = int'($floor(scale * (2.0 * y / (sigma * sigma)) + 0.5));
    if (q > 15) q = 15;
    if (q < -16) q = -16;
    return q;
  endfunction

  task automatic make_frame(real sigma, real scale);
    bit r1, r2, r3, fb;
    bit p1 [N];
    bit p2 [N];
    for (int k = 0; k < N; k++) u[k] = 1'($urandom_range(0, 1));
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      fb = u[k] ^ r2 ^ r3;  p1[k] = fb ^ r1 ^ r3;  r3 = r2; r2 = r1; r1 = fb;
    end
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      fb = u[qpp(k)] ^ r2 ^ r3;  p2[k] = fb ^ r1 ^ r3;  r3 = r2; r2 = r1; r1 = fb;
    end
    for (int k = 0; k < N; k++) begin
      ys[k] = chan(u[k], sigma, scale);  yp1[k] = chan(p1[k], sigma, scale);  yp2[k] = chan(p2[k], sigma, scale);
    end
  endtask

  task automatic run(bit en, int th, output int errs, output int skipped, output int total);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1; in_k = KB'(k);
      in_sys = 5'(ys[k]); in_par1 = 5'(yp1[k]); in_par2 = 5'(yp2[k]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    skip_en = en; theta = 8'(th);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done);
    @(negedge clk);
    errs = 0;
    for (int k = 0; k < N; k++) begin
      out_en = 1'b1; out_k = KB'(k);
      @(negedge clk);
      if (out_bit !== u[k]) errs++;
    end
    out_en = 1'b0;
    skipped = int'(cnt_win_skip);
    total = int'(cnt_win_skip + cnt_win_done);
  endtask

  initial begin
    int e, s, t;
    real sigma;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int sc = 0; sc < 2; sc++)
    for (int q = 0; q < 3; q++) begin
      err_off[q] = 0;
      for (int h = 0; h < 4; h++) begin err_th[q][h] = 0; skip_th[q][h] = 0; wins_th[q][h] = 0; end
      sigma = $sqrt(1.0 / (2.0 * (1.0 / 3.0) * (10.0 ** (EBN0[q] / 10.0))));
      for (int f = 0; f < FR; f++) begin
        make_frame(sigma, SCALE[sc]);
        run(1'b0, 10, e, s, t);
        err_off[q] += e;
        checks++;
        if (s != 0) begin failures++; $display("FAIL: skipping off but %0d skipped", s); end
        for (int h = 0; h < 4; h++) begin
          run(1'b1, THETA[h], e, s, t);
          err_th[q][h] += e; skip_th[q][h] += s; wins_th[q][h] += t;
        end
      end
      $display("LLR step 1/%0d, Eb/N0 %.1f dB: skip off errors=%0d", int'(SCALE[sc]), EBN0[q], err_off[q]);
      for (int h = 0; h < 4; h++)
        $display("  theta=%0d errors=%0d skipped windows=%0d of %0d (%.1f%%)", THETA[h], err_th[q][h],
                 skip_th[q][h], wins_th[q][h], 100.0 * real'(skip_th[q][h]) / real'(wins_th[q][h]));
      for (int h = 2; h < 4; h++) begin
        checks++;
        if (err_th[q][h] > err_off[q] + FR * N / 1000) begin
          failures++; $display("FAIL: theta=%0d degrades BER at %.1f dB", THETA[h], EBN0[q]);
        end
      end
      for (int h = 0; h < 3; h++) begin
        checks++;
        if (skip_th[q][h] < skip_th[q][h+1]) begin
          failures++; $display("FAIL: theta=%0d skips less than theta=%0d", THETA[h], THETA[h+1]);
        end
      end
      if (q > 0) begin
        checks++;
        if (skip_th[q][2] < skip_th[q-1][2]) begin
          failures++; $display("FAIL: skipping at theta=10 falls with SNR");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
