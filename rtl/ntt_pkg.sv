// ntt_pkg: constants, types and index-mapping functions shared by the NTT
// polynomial multiplier. The sizes (n = 1024, 32-bit coefficients, 64
// butterfly units, 128 coefficient banks of 8 words, 11-bit Montgomery word)
// are those of the published design. The bank placement functions are this
// design's own choice: coefficient i lives in bank (i>>3) ^ (i&7) at address
// i&7, which lets every stage touch each bank exactly once per cycle.
package ntt_pkg;
  localparam int unsigned POLY_N   = 1024;      // polynomial length
  localparam int unsigned LOGN     = 10;
  localparam int unsigned COEF_W   = 32;        // coefficient width
  localparam int unsigned MW       = 11;        // Montgomery word, log2(2n)
  localparam int unsigned MITER    = 3;         // reduction iterations, R = 2^33
  localparam int unsigned NUM_BFU  = 64;        // butterfly units
  localparam int unsigned NBANK    = 128;       // coefficient banks
  localparam int unsigned BDEPTH   = 8;         // words per bank
  localparam int unsigned NUM_LANES = 4;        // coefficients per 128-bit beat
  localparam int unsigned BEATS    = POLY_N / NUM_LANES; // beats per polynomial
  localparam int unsigned TWDEPTH  = LOGN * BDEPTH; // twiddles per unit: stage x cycle
  localparam int unsigned BF_LAT   = 5;         // butterfly latency (cycles)
  localparam int unsigned MUL_LAT  = 4;         // modular multiplier latency

  typedef logic [COEF_W-1:0] coef_t;

  // Butterfly operating mode.
  typedef enum logic [1:0] {
    BF_DIF = 2'd0,   // forward: (u+v, w*(u-v))
    BF_DIT = 2'd1,   // inverse: (u+w*v, u-w*v)
    BF_MUL = 2'd2    // inner product: (w*u, unused)
  } bf_mode_t;

  // Target of a configuration write.
  typedef enum logic [2:0] {
    CFG_MODULUS = 3'd0,  // q
    CFG_TW_FWD  = 3'd1,  // addr = {unit[5:0], stage*8+cycle[6:0]}, w^e * 2^33 mod q
    CFG_TW_INV  = 3'd2,  // same layout, w^-e * 2^33 mod q
    CFG_PSI     = 3'd3,  // addr = i, Psi^i * 2^33 mod q
    CFG_PSI_INV = 3'd4,  // addr = i, Psi^-i * n^-1 * 2^33 mod q
    CFG_KEY0    = 3'd5,  // addr = position, p0 (NTT domain, scrambled order) * 2^33 mod q
    CFG_KEY1    = 3'd6   // same for p1
  } cfg_sel_t;

  // Operation carried with each issued memory access.
  typedef enum logic [1:0] {
    OP_NTT  = 2'd0,
    OP_PWM0 = 2'd1,   // inner product with p0
    OP_PWM1 = 2'd2,   // inner product with p1
    OP_INTT = 2'd3
  } op_t;

  // One cycle's work as issued by the controller.
  typedef struct packed {
    logic       valid;
    op_t        op;
    logic [3:0] stage;   // butterfly span 2^stage (NTT/INTT)
    logic [3:0] cyc;     // cycle within a stage (0..7) or inner-product step (0..15)
    logic       dst;     // result memory 0 or 1 (PWM and INTT)
  } issue_t;

  // Bank and address of coefficient position i.
  function automatic logic [6:0] bank_of(input logic [LOGN-1:0] i);
    return i[9:3] ^ {4'b0, i[2:0]};
  endfunction
  function automatic logic [2:0] addr_of(input logic [LOGN-1:0] i);
    return i[2:0];
  endfunction

  // Bank-index bit that separates butterfly partners at a stage.
  function automatic logic [2:0] pair_bit(input logic [3:0] stage);
    return (stage >= 4'd3) ? 3'(stage - 4'd3) : stage[2:0];
  endfunction

  // Read/write address of bank b at cycle c of a stage.
  function automatic logic [2:0] stage_addr(input logic [3:0] stage, input logic [2:0] c,
                                            input logic [6:0] b);
    return (stage >= 4'd3) ? c : (c ^ b[2:0]);
  endfunction

  // Insert bit value t at position j of a 6-bit unit number, giving a bank.
  function automatic logic [6:0] insert_bit(input logic [5:0] u, input logic [2:0] j, input logic t);
    logic [6:0] lo_mask;
    lo_mask = (7'd1 << j) - 7'd1;
    return ((({1'b0, u}) & ~lo_mask) << 1) | (7'(t) << j) | ({1'b0, u} & lo_mask);
  endfunction

  // Remove bit j of a bank number, giving the unit that serves it.
  function automatic logic [5:0] remove_bit(input logic [6:0] b, input logic [2:0] j);
    logic [6:0] lo_mask;
    lo_mask = (7'd1 << j) - 7'd1;
    return 6'(((b >> 1) & ~lo_mask) | (b & lo_mask));
  endfunction

  // Bit value at position j of the bank holding the top (lower-index) element.
  function automatic logic top_bit(input logic [2:0] j, input logic [2:0] c);
    return (j < 3'd3) ? c[j[1:0]] : 1'b0;
  endfunction
endpackage
