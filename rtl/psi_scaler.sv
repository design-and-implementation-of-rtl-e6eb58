// psi_scaler: the lane multipliers that sit in the 128-bit stream path.
// Coefficient i of a polynomial travels in beat i / LANES, lane i % LANES.
// On input (inv = 0) each coefficient is multiplied by Psi^i (Psi a primitive
// 2n-th root of unity), turning the negacyclic product into a cyclic one; on
// output (inv = 1) by Psi^-i * n^-1, which undoes that weighting and the
// factor n left by the inverse transform. Each lane has its own two tables
// (Psi^i and Psi^-i n^-1 for its i, written by the host in Montgomery form,
// i.e. times 2^33 mod q) and its own mod_mul, so the scaling keeps pace with
// the stream and adds no time of its own, as in the published design. The
// core uses one instance on its input and one on its output, so each uses
// only one of its two tables; banking the tables by lane is this design's
// choice.
// Interface: in_valid/inv/beat/in_data in; out_valid/out_beat/out_data
// SC_LAT = 5 cycles later (1 table read + 4 multiply); one beat per cycle.
// Table write: cfg_we, cfg_inv (which table), cfg_addr = i, cfg_data.
module psi_scaler
  import ntt_pkg::MUL_LAT;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned LANES = 4,
  parameter int unsigned K     = 32,
  localparam int unsigned NB   = N / LANES,
  localparam int unsigned BW   = $clog2(NB),
  localparam int unsigned IW   = $clog2(N),
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [K-1:0]             q,
  // table writes
  input  logic                     cfg_we,
  input  logic                     cfg_inv,
  input  logic [IW-1:0]            cfg_addr,
  input  logic [K-1:0]             cfg_data,
  // stream in
  input  logic                     in_valid,
  input  logic                     inv,
  input  logic [BW-1:0]            beat,
  input  logic [LANES-1:0][K-1:0]  in_data,
  // stream out
  output logic                     out_valid,
  output logic [BW-1:0]            out_beat,
  output logic [LANES-1:0][K-1:0]  out_data
);
  localparam int unsigned LAT = 1 + MUL_LAT;

  logic [LANES-1:0][K-1:0] fwd_rd, inv_rd;
  logic [LANES-1:0][K-1:0] x_d;
  logic                    inv_d;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic wsel;
    assign wsel = cfg_we && (cfg_addr[LW-1:0] == LW'(l));
    sdp_ram #(.DEPTH(NB), .K(K)) u_psi (
      .clk(clk), .we(wsel && !cfg_inv), .waddr(cfg_addr[IW-1:IW-BW]), .wdata(cfg_data),
      .re(in_valid), .raddr(beat), .rdata(fwd_rd[l]));
    sdp_ram #(.DEPTH(NB), .K(K)) u_psi_inv (
      .clk(clk), .we(wsel && cfg_inv), .waddr(cfg_addr[IW-1:IW-BW]), .wdata(cfg_data),
      .re(in_valid), .raddr(beat), .rdata(inv_rd[l]));
    mod_mul #(.K(K)) u_mul (
      .clk(clk), .a(x_d[l]), .b(inv_d ? inv_rd[l] : fwd_rd[l]), .q(q), .p(out_data[l]));
  end

  always_ff @(posedge clk) begin
    x_d   <= in_data;
    inv_d <= inv;
  end

  logic [LAT-1:0]          v_sr;
  logic [LAT-1:0][BW-1:0]  b_sr;
  always_ff @(posedge clk) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[LAT-2:0], in_valid};
    b_sr <= {b_sr[LAT-2:0], beat};
  end
  assign out_valid = v_sr[LAT-1];
  assign out_beat  = b_sr[LAT-1];
endmodule
