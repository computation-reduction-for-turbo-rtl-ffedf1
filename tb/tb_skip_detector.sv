// tb_skip_detector: random windows of a-priori and extrinsic LLRs, some of
// them all reliable, against the AND of |x| >= theta over the window (eq. (5)).
// Boundary values (|x| = theta, theta-1, -128) are included.
module tb_skip_detector;
  import tdec_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, apr_valid = 0, ext_valid = 0;
  logic [7:0] theta = 8'd10;
  ext_t apr_llr = '0, ext_llr = '0;
  logic sigma;
  int checks = 0, failures = 0, n_one = 0, n_zero = 0;
  skip_detector dut (.*);
  always #5 clk = ~clk;

  function automatic int pick(int th, bit good);
    int m;
    if (good) m = th + $urandom_range(0, 3);
    else      m = $urandom_range(0, (th > 0) ? th - 1 : 0);
    if (m > 128) m = 128;
    if (m == 128) return -128;
    return ($urandom_range(0, 1) == 1) ? m : -m;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 400; w++) begin
      bit exp_sig;
      int bad_pos;
      exp_sig = 1;
      theta = 8'($urandom_range(1, 128));
      bad_pos = (w % 3 == 0) ? -1 : $urandom_range(0, 63);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int l = 0; l < 64; l++) begin
        int x;
        x = pick(int'(theta), l != bad_pos);
        if (l < 32) begin apr_valid = 1; apr_llr = ext_t'(x); end
        else        begin ext_valid = 1; ext_llr = ext_t'(x); end
        if ((x < 0 ? -x : x) < int'(theta)) exp_sig = 0;
        @(negedge clk);
        apr_valid = 0; ext_valid = 0;
        // invalid strobes must be ignored
        apr_llr = '0; ext_llr = '0;
        @(negedge clk);
      end
      checks++;
      if (sigma !== exp_sig) begin failures++; $display("FAIL window %0d sigma=%0d", w, sigma); end
      if (exp_sig) n_one++; else n_zero++;
    end
    checks++;
    if (n_one == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
