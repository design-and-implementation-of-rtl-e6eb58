// async_fifo: dual-clock FIFO carrying 128-bit beats between the PCIe/driver
// clock (250 MHz) and the datapath clock (200 MHz). Separate input and output
// FIFOs of this kind decouple the host link from the multiplier, as in the
// published framework; depth and structure are this design's choice.
// Binary read/write pointers with one extra wrap bit are exchanged between
// the domains in Gray code through two-flop synchronisers. Full is seen on
// the write side and empty on the read side, each pessimistically.
// Interface: write side wvalid/wready/wdata, plus wfree = free entries as
// the write side sees them; read side rvalid/rready/rdata (first-word
// fall-through: rdata is the head entry whenever rvalid is high).
module async_fifo #(
  parameter int unsigned W     = 128,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wvalid,
  output logic         wready,
  input  logic [W-1:0] wdata,
  output logic [AW:0]  wfree,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         rvalid,
  input  logic         rready,
  output logic [W-1:0] rdata
);
  logic [W-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [AW:0] wptr, wptr_g, rptr_g_s1, rptr_g_s2, rptr_w;
  logic [AW:0] rptr, rptr_g, wptr_g_s1, wptr_g_s2;

  // write domain
  assign rptr_w = gray2bin(rptr_g_s2);
  assign wfree  = (AW+1)'(DEPTH) - (wptr - rptr_w);
  assign wready = (wfree != '0);
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wptr      <= '0;
      wptr_g    <= '0;
      rptr_g_s1 <= '0;
      rptr_g_s2 <= '0;
    end else begin
      rptr_g_s1 <= rptr_g;
      rptr_g_s2 <= rptr_g_s1;
      if (wvalid && wready) begin
        wptr   <= wptr + 1'b1;
        wptr_g <= bin2gray(wptr + 1'b1);
      end
    end
  end
  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wptr[AW-1:0]] <= wdata;
  end

  // read domain
  assign rvalid = (rptr_g != wptr_g_s2);
  assign rdata  = mem[rptr[AW-1:0]];
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rptr      <= '0;
      rptr_g    <= '0;
      wptr_g_s1 <= '0;
      wptr_g_s2 <= '0;
    end else begin
      wptr_g_s1 <= wptr_g;
      wptr_g_s2 <= wptr_g_s1;
      if (rvalid && rready) begin
        rptr   <= rptr + 1'b1;
        rptr_g <= bin2gray(rptr + 1'b1);
      end
    end
  end
endmodule
