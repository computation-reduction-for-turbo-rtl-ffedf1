// qpp_interleaver: address of the LTE quadratic permutation polynomial
// interleaver, pi(k) = (F1*k + F2*k^2) mod N. The defaults are the LTE
// coefficients for the largest block, N = 6144 (F1 = 263, F2 = 480). The
// product is reduced modulo N in two steps, (F2*k mod N)*k, to keep the words
// short. Purely combinational. The QPP form and its coefficients come from
// the LTE standard; the direct (non-recursive) computation is a choice of this
// implementation.
//
// A QPP is contention free for every window M that divides N: the P
// addresses pi(i*M + t), i = 0..P-1, fall into P different banks of M words
// and share the offset pi(t) mod M. The decoder's bank network relies on this.
module qpp_interleaver #(
  parameter int N  = 6144,
  parameter int F1 = 263,
  parameter int F2 = 480
) (
  input  logic [$clog2(N)-1:0] k,
  output logic [$clog2(N)-1:0] pi
);
  localparam int KB = $clog2(N);
  logic [2*KB+10:0] a, b, c;
  always_comb begin
    a  = ((2*KB+11)'(F2) * (2*KB+11)'(k)) % (2*KB+11)'(N);
    b  = (a * (2*KB+11)'(k)) % (2*KB+11)'(N);
    c  = ((2*KB+11)'(F1) * (2*KB+11)'(k) + b) % (2*KB+11)'(N);
    pi = KB'(c);
  end
endmodule
