// sdp_ram: simple dual-port memory with one write port and one registered
// read port, the shape of an FPGA block RAM. Used for the per-unit twiddle
// tables, the Psi tables and, 128 at a time, the coefficient banks.
// Interface: a write happens at the clock edge when we is high; rdata shows
// mem[raddr] one cycle after re. A read of the address being written in the
// same cycle returns the old word. Contents are not reset.
module sdp_ram #(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned K     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [K-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [K-1:0]  rdata
);
  logic [K-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
