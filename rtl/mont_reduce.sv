// mont_reduce: word-level Montgomery reduction specialised to NTT-friendly
// primes q = qH * 2^W + 1 (q = 1 mod 2n, W = log2(2n) = 11 for n = 1024).
// Because q = 1 mod 2^W, mu = -q^-1 mod 2^W is -1, so each iteration needs no
// multiplication by mu: with L = T1 mod 2^W and T2 = -L mod 2^W,
//   T1 <- (T1 >> W) + qH * T2 + carry,   carry = T2[W-1] | L[W-1]  (= L != 0).
// After ITER = 3 iterations T1 = c * 2^-33 mod q plus at most one q (K < 33),
// removed by a final conditional subtraction.
// Interface: c (product, < q^2 for fully reduced inputs) and q in; res out two
// cycles later, fully reduced below q; a new input every cycle. Iterations 1-2
// form the first pipeline stage, iteration 3 and the subtraction the second:
// the split is this design's choice, the arithmetic is the published one.
module mont_reduce #(
  parameter int unsigned K    = 32,
  parameter int unsigned W    = 11,
  parameter int unsigned ITER = 3
) (
  input  logic           clk,
  input  logic [2*K-1:0] c,
  input  logic [K-1:0]   q,
  output logic [K-1:0]   res
);
  localparam int unsigned TW = 2 * K + 1;   // iteration value width
  localparam int unsigned S1 = ITER - 1;    // iterations in stage 1

  function automatic logic [TW-1:0] step(input logic [TW-1:0] t, input logic [K-W-1:0] qh);
    logic [W-1:0] lo, neg;
    logic         carry;
    lo    = t[W-1:0];
    neg   = W'(0) - lo;                       // two's complement of the low word
    carry = neg[W-1] | lo[W-1];
    return (t >> W) + (TW'(qh) * TW'(neg)) + TW'(carry);
  endfunction

  logic [K-W-1:0] qh;
  assign qh = q[K-1:W];

  logic [TW-1:0] t_s1;
  logic [K-1:0]  q_s1;

  always_ff @(posedge clk) begin
    logic [TW-1:0] t;
    t = TW'(c);
    for (int i = 0; i < S1; i++) t = step(t, qh);
    t_s1 <= t;
    q_s1 <= q;
  end

  always_ff @(posedge clk) begin
    logic [TW-1:0] t;
    logic signed [TW:0] t4;
    t  = step(t_s1, q_s1[K-1:W]);
    t4 = $signed({1'b0, t}) - $signed({{(TW-K+1){1'b0}}, q_s1});
    res <= (t4 < 0) ? t[K-1:0] : t4[K-1:0];
  end
endmodule
