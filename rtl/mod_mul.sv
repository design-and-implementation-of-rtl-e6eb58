// mod_mul: Montgomery modular multiplier, p = a * b * 2^-33 mod q.
// An int_mul (four 16x16 core products and an adder tree, 2 cycles) feeds a
// mont_reduce for NTT-friendly primes (2 cycles). Constants that are used as
// the b operand (twiddle factors, keys, Psi powers) are stored premultiplied by
// 2^33 mod q, so the product comes out in the ordinary domain.
// Interface: a, b < q and q in; p out MUL_LAT = 4 cycles later, below q. q
// travels with its operands so that the pipeline is self-contained.
module mod_mul #(
  parameter int unsigned K = 32
) (
  input  logic         clk,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] q,
  output logic [K-1:0] p
);
  logic [2*K-1:0] prod;
  logic [K-1:0]   q_d1, q_d2;

  always_ff @(posedge clk) begin
    q_d1 <= q;
    q_d2 <= q_d1;
  end

  int_mul #(.K(K)) u_mul (.clk(clk), .a(a), .b(b), .p(prod));
  mont_reduce #(.K(K)) u_red (.clk(clk), .c(prod), .q(q_d2), .res(p));
endmodule
