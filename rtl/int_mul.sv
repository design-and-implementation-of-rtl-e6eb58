// int_mul: pipelined K x K unsigned multiplier built from four
// (K/2) x (K/2) core multipliers and an adder tree, as a DSP-based FPGA
// multiplier: with K = 32 each core product is 16 x 16 and fits one DSP slice.
// Stage 1 registers the four partial products (the DSP output registers);
// stage 2 adds them, shifted, and registers the 2K-bit product.
// Interface: a, b in; p out two clock cycles later; a new pair every cycle.
// The 4-multiplier / adder-tree split follows the published design; the
// second register is this design's choice.
module int_mul #(
  parameter int unsigned K = 32
) (
  input  logic           clk,
  input  logic [K-1:0]   a,
  input  logic [K-1:0]   b,
  output logic [2*K-1:0] p
);
  localparam int unsigned H = K / 2;
  logic [K-1:0] pp_ll, pp_lh, pp_hl, pp_hh;

  always_ff @(posedge clk) begin
    pp_ll <= a[H-1:0] * b[H-1:0];
    pp_lh <= a[H-1:0] * b[K-1:H];
    pp_hl <= a[K-1:H] * b[H-1:0];
    pp_hh <= a[K-1:H] * b[K-1:H];
  end

  always_ff @(posedge clk) begin
    p <= {pp_hh, pp_ll}
       + ({{H{1'b0}}, pp_lh, {H{1'b0}}})
       + ({{H{1'b0}}, pp_hl, {H{1'b0}}});
  end
endmodule
