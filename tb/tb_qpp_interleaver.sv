// tb_qpp_interleaver: the default N=6144 interleaver is run over every k and
// compared with (263*k + 480*k^2) mod 6144 in 64-bit arithmetic. It also checks
// that the result is a permutation and that it is contention free for P=8
// SISOs: pi(i*768 + t) mod 768 is the same for all i and the banks differ.
module tb_qpp_interleaver;
  localparam int N = 6144, M = 768, P = 8;
  logic [12:0] k, pi;
  int checks = 0, failures = 0;
  bit seen [N];
  int pis [N];
  qpp_interleaver dut (.*);
  initial begin
    for (int i = 0; i < N; i++) begin
      longint e;
      k = 13'(i);
      #1;
      e = (263 * longint'(i) + 480 * longint'(i) * longint'(i)) % longint'(N);
      pis[i] = int'(pi);
      checks++;
      if (longint'(pi) != e) begin failures++; $display("FAIL k=%0d pi=%0d exp %0d", i, pi, e); end
      if (seen[pi]) begin failures++; $display("FAIL repeated %0d", pi); end
      seen[pi] = 1;
    end
    for (int t = 0; t < M; t++) begin
      bit bank [P];
      for (int i = 0; i < P; i++) bank[i] = 0;
      checks++;
      for (int i = 0; i < P; i++) begin
        if (pis[i*M + t] % M != pis[t] % M) begin failures++; $display("FAIL offset t=%0d", t); end
        if (bank[pis[i*M + t] / M]) begin failures++; $display("FAIL bank t=%0d", t); end
        bank[pis[i*M + t] / M] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
