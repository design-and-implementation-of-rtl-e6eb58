// ntt_unit: the butterfly of the NTT datapath, fully pipelined, latency
// BF_LAT = 5 cycles in every mode, one butterfly per cycle.
//   BF_DIF (forward transform):  y0 = u + v,      y1 = w * (u - v)
//   BF_DIT (inverse transform):  y0 = u + w * v,  y1 = u - w * v
//   BF_MUL (inner product):      y0 = w * u
// "w * x" is the Montgomery product mod_mul, so w is given as w * 2^33 mod q.
// Forward mode adds/subtracts in the first cycle and multiplies in the next
// four; inverse and multiply modes multiply in the first four cycles and
// add/subtract in the fifth. The forward butterfly and the 5-cycle latency are
// the published ones. Using a decimation-in-time butterfly for the inverse,
// so that it consumes the scrambled order of the forward transform and returns
// natural order, and the multiply-only mode for the inner products, are this
// design's reading of the published text.
// The mode must stay constant while butterflies of it are in flight (the
// controller drains the pipeline between operations).
module ntt_unit
  import ntt_pkg::bf_mode_t, ntt_pkg::BF_DIF, ntt_pkg::BF_DIT, ntt_pkg::BF_MUL;
#(
  parameter int unsigned K = 32
) (
  input  logic         clk,
  input  bf_mode_t     mode,
  input  logic [K-1:0] u,
  input  logic [K-1:0] v,
  input  logic [K-1:0] w,
  input  logic [K-1:0] q,
  output logic [K-1:0] y0,
  output logic [K-1:0] y1
);
  // cycle 1 (forward mode): modular add and subtract
  logic [K-1:0] s_c, d_c;
  logic [K-1:0] s_d [1:5];
  logic [K-1:0] d_r, w_r, q_r;
  mod_add #(.K(K)) u_add (.a(u), .b(v), .q(q), .c(s_c));
  mod_sub #(.K(K)) u_sub (.a(u), .b(v), .q(q), .c(d_c));

  always_ff @(posedge clk) begin
    s_d[1] <= s_c;
    d_r    <= d_c;
    w_r    <= w;
    q_r    <= q;
    for (int i = 2; i <= 5; i++) s_d[i] <= s_d[i-1];
  end

  // multiplier: registered difference in forward mode, raw inputs otherwise
  logic [K-1:0] ma, mb, mq, p;
  always_comb begin
    if (mode == BF_DIF) begin
      ma = d_r; mb = w_r; mq = q_r;
    end else if (mode == BF_DIT) begin
      ma = v;   mb = w;   mq = q;
    end else begin
      ma = u;   mb = w;   mq = q;
    end
  end
  mod_mul #(.K(K)) u_mul (.clk(clk), .a(ma), .b(mb), .q(mq), .p(p));

  // delay lines for the inverse/multiply path
  logic [K-1:0] u_d [1:4];
  logic [K-1:0] q_d [1:4];
  bf_mode_t     m_d [1:5];
  always_ff @(posedge clk) begin
    u_d[1] <= u;
    q_d[1] <= q;
    m_d[1] <= mode;
    for (int i = 2; i <= 4; i++) begin
      u_d[i] <= u_d[i-1];
      q_d[i] <= q_d[i-1];
    end
    for (int i = 2; i <= 5; i++) m_d[i] <= m_d[i-1];
  end

  // cycle 5 (inverse / multiply modes): add and subtract the product
  logic [K-1:0] a_c, b_c, y0_r, y1_r;
  mod_add #(.K(K)) u_add2 (.a(u_d[4]), .b(p), .q(q_d[4]), .c(a_c));
  mod_sub #(.K(K)) u_sub2 (.a(u_d[4]), .b(p), .q(q_d[4]), .c(b_c));
  always_ff @(posedge clk) begin
    if (m_d[4] == BF_MUL) begin
      y0_r <= p;
      y1_r <= '0;
    end else begin
      y0_r <= a_c;
      y1_r <= b_c;
    end
  end

  always_comb begin
    if (m_d[5] == BF_DIF) begin
      y0 = s_d[5];
      y1 = p;
    end else begin
      y0 = y0_r;
      y1 = y1_r;
    end
  end
endmodule
