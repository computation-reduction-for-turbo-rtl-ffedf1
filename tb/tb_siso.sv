// tb_siso: checks one SISO (W=8, M_W=4, holding the whole frame) bit-exactly
// against a reference Max-Log-MAP model written in the testbench.
//
// The testbench plays the controller: for each window it pulses win_start,
// feeds W forward steps, runs W backward steps and pulses win_end. The
// reference keeps its own state-metric, border and status memories and
// computes the same normalised, saturated recursions, the delta=0.75 extrinsic
// scaling, s_hat and sigma. Five passes over the frame are made: two with
// random a-priori LLRs and skipping off, then three with large a-priori LLRs,
// strong channel LLRs in windows 1 and 3 and skipping on, so that windows get
// skipped and the windows after them start from s_hat.
// Every extrinsic LLR, hard decision, skip request and the exported border
// metrics are compared.
module tb_siso;
  localparam int W  = 8;
  localparam int MW = 4;
  localparam int Q  = 8;
  localparam int SMIN = -2048;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_clear = 1'b0, skip_en = 1'b0, half = 1'b0;
  logic [7:0] theta = 8'd0;
  logic [1:0] win_j = '0;
  logic win_start = 0, fwd_valid = 0, bwd_valid = 0, win_end = 0, slot_skip = 0;
  logic [2:0] fwd_l = '0, bwd_l = '0;
  logic signed [4:0] sys_llr = '0, par_llr = '0;
  logic signed [7:0] apr_llr = '0;
  logic skip_req, active, shat_init, ext_valid, hard;
  logic signed [7:0] ext_llr;
  tdec_pkg::metric_vec_t alpha_left_in, alpha_out, beta_right_in, beta_out;

  always #5 clk = ~clk;

  siso #(.W(W), .MW(MW), .IS_FIRST(1'b1), .IS_LAST(1'b1)) dut (.*);

  assign alpha_left_in = '0;
  assign beta_right_in = '0;

  int checks = 0, failures = 0, n_skipped = 0, n_shat = 0;

  // frame data
  int ls [MW*W], lp [MW*W], la [MW*W];
  // reference state
  int border [MW][Q];
  bit rsig [MW];
  int rshat [MW];
  int aend [Q];
  bit prev_skip;

  function automatic void edge_of(int s, int u, output int ns, output int p);
    int r1, r2, r3, fb;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    fb = u ^ r2 ^ r3;
    p  = fb ^ r1 ^ r3;
    ns = (fb << 2) | (r1 << 1) | r2;
  endfunction

  function automatic int gam(int k, int u, int p);
    return u * (ls[k] + la[k]) + p * lp[k];
  endfunction

  function automatic void norm(inout int m [Q]);
    int mx = m[0];
    for (int s = 1; s < Q; s++) if (m[s] > mx) mx = m[s];
    for (int s = 0; s < Q; s++) begin
      m[s] -= mx;
      if (m[s] < SMIN) m[s] = SMIN;
    end
  endfunction

  task automatic run_pass(bit en, bit big_apr);
    int a [Q], b [Q], an [Q], bn [Q], amem [W][Q];
    int ns, p, k, m0, m1, raw, e, apo, mx;
    bit sig, skipme;
    skip_en = en;
    for (int k2 = 0; k2 < MW*W; k2++)
      la[k2] = big_apr ? ((($urandom_range(0, 1) == 1) ? 1 : -1) * $urandom_range(20, 127))
                       : $signed($urandom_range(0, 255)) - 128;
    for (int j = 0; j < MW; j++) begin
      skipme = en && rsig[j];
      @(negedge clk);
      win_j = 2'(j);
      #1;
      checks++;
      if (skip_req !== skipme) begin failures++; $display("FAIL skip_req j=%0d", j); end
      win_start = 1'b1;
      // reference alpha init
      if (!skipme) begin
        for (int s = 0; s < Q; s++) begin
          if (j == 0) a[s] = (s == 0) ? 0 : SMIN;
          else if (prev_skip) a[s] = (s == rshat[j-1]) ? 0 : SMIN;
          else a[s] = aend[s];
          b[s] = (j == MW - 1) ? 0 : border[j+1][s];
        end
        if (j > 0 && prev_skip) n_shat++;
      end else n_skipped++;
      @(negedge clk);
      win_start = 1'b0;
      sig = 1'b1;
      for (int l = 0; l < W; l++) begin
        k = j * W + l;
        fwd_valid = 1'b1; fwd_l = 3'(l);
        sys_llr = 5'(ls[k]); par_llr = 5'(lp[k]); apr_llr = 8'(la[k]);
        if (!skipme) begin
          amem[l] = a;
          if (la[k] < int'(theta) && -la[k] < int'(theta)) sig = 1'b0;
          for (int s = 0; s < Q; s++) an[s] = -100000;
          for (int s = 0; s < Q; s++)
            for (int u = 0; u < 2; u++) begin
              edge_of(s, u, ns, p);
              if (a[s] + gam(k, u, p) > an[ns]) an[ns] = a[s] + gam(k, u, p);
            end
          norm(an);
          a = an;
        end
        @(negedge clk);
      end
      fwd_valid = 1'b0;
      if (!skipme) begin
        aend = a;
        mx = 0;
        for (int s = 1; s < Q; s++) if (a[s] > a[mx]) mx = s;
      end
      for (int l = W - 1; l >= 0; l--) begin
        k = j * W + l;
        bwd_valid = 1'b1; bwd_l = 3'(l);
        #1;
        if (!skipme) begin
          m0 = -100000; m1 = -100000;
          for (int s = 0; s < Q; s++)
            for (int u = 0; u < 2; u++) begin
              edge_of(s, u, ns, p);
              if (u == 1 && amem[l][s] + p * lp[k] + b[ns] > m1) m1 = amem[l][s] + p * lp[k] + b[ns];
              if (u == 0 && amem[l][s] + p * lp[k] + b[ns] > m0) m0 = amem[l][s] + p * lp[k] + b[ns];
            end
          raw = m1 - m0;
          apo = raw + ls[k] + la[k];
          e = (3 * raw) >>> 2;
          if (e > 127) e = 127;
          if (e < -128) e = -128;
          if (e < int'(theta) && -e < int'(theta)) sig = 1'b0;
          checks++;
          if (!ext_valid || ext_llr !== 8'(e) || hard !== (apo > 0)) begin
            failures++;
            $display("FAIL j=%0d l=%0d ext=%0d exp=%0d hard=%0d", j, l, ext_llr, e, hard);
          end
          for (int s = 0; s < Q; s++) bn[s] = -100000;
          for (int s = 0; s < Q; s++)
            for (int u = 0; u < 2; u++) begin
              edge_of(s, u, ns, p);
              if (b[ns] + gam(k, u, p) > bn[s]) bn[s] = b[ns] + gam(k, u, p);
            end
          norm(bn);
          b = bn;
        end else begin
          checks++;
          if (ext_valid) begin failures++; $display("FAIL ext_valid in skipped window"); end
        end
        @(negedge clk);
      end
      bwd_valid = 1'b0;
      win_end = 1'b1;
      @(negedge clk);
      win_end = 1'b0;
      if (!skipme) begin
        border[j] = b;
        rsig[j]   = sig;
        rshat[j]  = mx;
      end
      prev_skip = skipme;
      if (j == 0) begin
        #1;
        checks++;
        for (int s = 0; s < Q; s++)
          if (beta_out[s] !== 12'(border[0][s])) begin
            failures++; $display("FAIL beta_out"); break;
          end
      end
    end
  endtask

  initial begin
    for (int j = 0; j < MW; j++) begin
      rsig[j] = 0; rshat[j] = 0;
      for (int s = 0; s < Q; s++) border[j][s] = 0;
    end
    for (int s = 0; s < Q; s++) aend[s] = 0;
    prev_skip = 0;
    for (int k = 0; k < MW*W; k++) begin
      ls[k] = $signed($urandom_range(0, 31)) - 16;
      lp[k] = $signed($urandom_range(0, 31)) - 16;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame_clear = 1'b1;
    @(negedge clk);
    frame_clear = 1'b0;
    theta = 8'd10;
    run_pass(1'b0, 1'b0);
    run_pass(1'b0, 1'b0);
    // make windows 1 and 3 reliable
    for (int k = 0; k < MW*W; k++) begin
      if ((k / W) % 2 == 1) begin
        ls[k] = ((k % 3) == 0) ? 15 : -16;
        lp[k] = ((k % 5) == 0) ? 15 : -16;
      end
    end
    theta = 8'd4;
    run_pass(1'b1, 1'b1);
    run_pass(1'b1, 1'b1);
    run_pass(1'b1, 1'b1);
    $display("skipped windows=%0d s_hat inits=%0d", n_skipped, n_shat);
    checks++;
    if (n_skipped == 0 || n_shat == 0) begin
      failures++; $display("FAIL: skipping not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
