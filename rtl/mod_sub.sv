// mod_sub: constant-time partial modular subtraction (combinational).
// It forms T1 = a-b, T2 = T1+q and T3 = T1+2q side by side and returns T1 if
// it is not negative, else T2 if that is not negative, else T3. With b < 2^K
// and q > 2^(K-1) the result is a non-negative K-bit number; with a, b < q it
// is fully reduced, below q.
// Interface: a, b, q in; c out, same cycle. The structure follows the
// published algorithm; registering is left to the caller.
module mod_sub #(
  parameter int unsigned K = 32
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] q,
  output logic [K-1:0] c
);
  logic signed [K+2:0] t1, t2, t3;
  always_comb begin
    t1 = $signed({3'b000, a}) - $signed({3'b000, b});
    t2 = t1 + $signed({3'b000, q});
    t3 = t1 + $signed({2'b00, q, 1'b0});
    if (t2 < 0)      c = t3[K-1:0];
    else if (t1 < 0) c = t2[K-1:0];
    else             c = t1[K-1:0];
  end
endmodule
