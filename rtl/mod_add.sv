// mod_add: constant-time partial modular addition (combinational).
// It forms T1 = a+b, T2 = T1-q and T3 = T1-2q side by side and returns the
// first of them that is not negative, so the time taken never depends on the
// data. With a, b < 2^K and q > 2^(K-1) the result is below 2^K; with a, b < q
// (as everywhere in this design) it is fully reduced, below q.
// Interface: a, b, q in; c out, same cycle. The three-candidate structure
// follows the published algorithm; the absence of a register is a choice
// here, the caller registers the result.
module mod_add #(
  parameter int unsigned K = 32
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] q,
  output logic [K-1:0] c
);
  logic signed [K+2:0] t1, t2, t3;
  always_comb begin
    t1 = $signed({3'b000, a}) + $signed({3'b000, b});
    t2 = t1 - $signed({3'b000, q});
    t3 = t1 - $signed({2'b00, q, 1'b0});
    if (t2 < 0)      c = t1[K-1:0];
    else if (t3 < 0) c = t2[K-1:0];
    else             c = t3[K-1:0];
  end
endmodule
