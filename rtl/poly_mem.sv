// poly_mem: one polynomial's coefficient memory, split into BANKS separate
// banks of DEPTH words (128 x 8 = 1024 coefficients), each with its own read
// and write address so that 64 butterflies can read two coefficients each and
// write two results each in every cycle. The split into 128 banks of 8 is the
// published one; which coefficient sits where is decided by the users of the
// memory (see ntt_pkg::bank_of).
// Interface: per bank, re/raddr give rdata one cycle later; we/waddr/wdata
// write at the clock edge.
module poly_mem #(
  parameter int unsigned BANKS = 128,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned K     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic [BANKS-1:0]          re,
  input  logic [BANKS-1:0][AW-1:0]  raddr,
  output logic [BANKS-1:0][K-1:0]   rdata,
  input  logic [BANKS-1:0]          we,
  input  logic [BANKS-1:0][AW-1:0]  waddr,
  input  logic [BANKS-1:0][K-1:0]   wdata
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sdp_ram #(.DEPTH(DEPTH), .K(K)) u_bank (
      .clk(clk), .we(we[b]), .waddr(waddr[b]), .wdata(wdata[b]),
      .re(re[b]), .raddr(raddr[b]), .rdata(rdata[b]));
  end
endmodule
