// tb_turbo_ctrl: the controller with P=4, W=4, M_W=3, 2 iterations. The
// testbench answers skip_req from a pattern over (iteration, half, window):
// some slots are skipped by every SISO, others by some. It checks the order of
// the slots, the read and backward step indices, that fwd_valid/fwd_l are the
// read strobes delayed by one cycle, the number of computed and skipped slots
// and the total cycle count 1 + (2W+3)*computed + skipped.
module tb_turbo_ctrl;
  localparam int P = 4, W = 4, MW = 3, ITER = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [P-1:0] skip_req;
  logic busy, done, frame_clear, half, win_start, slot_skip, rd_en, fwd_valid, bwd_valid, win_end;
  logic [0:0] iter;
  logic [1:0] win_j, rd_l, fwd_l, bwd_l;
  int checks = 0, failures = 0;
  int n_start = 0, n_skip = 0, n_end = 0, cycles = 0, exp_start = 0, exp_skip = 0;
  int exp_l = 0, exp_bl = W - 1, slot = 0, n_clear = 0;
  bit prev_rd = 0;
  int prev_l = 0;
  turbo_ctrl #(.P(P), .W(W), .MW(MW), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [P-1:0] pattern(int it, int h, int j);
    if (it == 1 && j == 1) return '1;          // whole slot skipped
    if (it == 1 && h == 1 && j == 2) return '1;
    if (j == 0) return 4'b0101;                // partly skipped
    return '0;
  endfunction

  always_comb skip_req = pattern(int'(iter), int'(half), int'(win_j));

  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (frame_clear) n_clear++;
    checks++;
    if (fwd_valid !== prev_rd || (fwd_valid && fwd_l !== 2'(prev_l))) begin
      failures++; $display("FAIL fwd delay");
    end
    prev_rd = rd_en; prev_l = int'(rd_l);
    if (win_start || slot_skip) begin
      checks++;
      // slot order: iteration, half, window
      if (slot != ((int'(iter) * 2 + int'(half)) * MW + int'(win_j))) begin
        failures++; $display("FAIL slot order %0d", slot);
      end
      slot++;
    end
    if (win_start) begin n_start++; exp_l = 0; end
    if (slot_skip) n_skip++;
    if (rd_en) begin
      checks++;
      if (int'(rd_l) != exp_l) begin failures++; $display("FAIL rd_l"); end
      exp_l++;
      exp_bl = W - 1;
    end
    if (bwd_valid) begin
      checks++;
      if (int'(bwd_l) != exp_bl) begin failures++; $display("FAIL bwd_l"); end
      exp_bl--;
    end
    if (win_end) n_end++;
  end

  initial begin
    for (int it = 0; it < ITER; it++)
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < MW; j++)
          if (&pattern(it, h, j)) exp_skip++; else exp_start++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks += 5;
    if (n_start != exp_start || n_end != exp_start) begin failures++; $display("FAIL starts %0d", n_start); end
    if (n_skip != exp_skip) begin failures++; $display("FAIL skips %0d", n_skip); end
    if (cycles != 1 + exp_start * (2 * W + 3) + exp_skip) begin failures++; $display("FAIL cycles %0d", cycles); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
    if (n_clear != 1) begin failures++; $display("FAIL clear"); end
    $display("slots computed=%0d skipped=%0d cycles=%0d", n_start, n_skip, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
