// ntt_accel_top: FPGA side of the host/accelerator framework. The host
// streams a polynomial u (1024 coefficients, four per 128-bit beat) over the
// PCIe link; the accelerator returns u*p0 and u*p1 mod (x^1024 + 1, q), or
// u*p0 alone in single mode, where the keys p0, p1 were loaded beforehand in
// the NTT domain. The link side runs on the 250 MHz driver clock, the
// multiplier on a separate 200 MHz datapath clock; an input FIFO and an
// output FIFO carry the beats between the two, as in the published
// framework. The PCIe endpoint and its driver are not part of this RTL: their
// 128-bit receive and transmit streams are this module's link ports.
// Interface (link clock): rx_valid/rx_ready/rx_data in, tx_valid/tx_ready/
// tx_data out, valid/ready handshakes. Datapath clock: single (mode of the
// next job), cfg_* writes of modulus, twiddles, Psi tables and keys (see
// ntt_pkg::cfg_sel_t), busy. The configuration port sitting in the datapath
// clock domain is this design's choice.
module ntt_accel_top
  import ntt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  // PCIe / driver side
  input  logic                      link_clk,
  input  logic                      link_rst_n,
  input  logic                      rx_valid,
  output logic                      rx_ready,
  input  logic [NUM_LANES*COEF_W-1:0] rx_data,
  output logic                      tx_valid,
  input  logic                      tx_ready,
  output logic [NUM_LANES*COEF_W-1:0] tx_data,
  // datapath side
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      single,
  input  logic                      cfg_we,
  input  cfg_sel_t                  cfg_sel,
  input  logic [12:0]               cfg_addr,
  input  logic [COEF_W-1:0]         cfg_data,
  output logic                      busy,
  output logic                      ntt_busy
);
  localparam int unsigned BW = NUM_LANES * COEF_W;
  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic          c_in_valid, c_in_ready, c_out_valid;
  logic [BW-1:0] c_in_data, c_out_data;
  logic [AW:0]   in_free_unused, out_free;
  logic          out_wready_unused;

  // out_free is passed to the core as a 10-bit count
  initial assert (FIFO_DEPTH <= 512 && FIFO_DEPTH >= 16) else $error("FIFO_DEPTH must be 16..512");

  async_fifo #(.W(BW), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .wclk(link_clk), .wrst_n(link_rst_n), .wvalid(rx_valid), .wready(rx_ready),
    .wdata(rx_data), .wfree(in_free_unused),
    .rclk(clk), .rrst_n(rst_n), .rvalid(c_in_valid), .rready(c_in_ready), .rdata(c_in_data));

  poly_mult_core u_core (
    .clk(clk), .rst_n(rst_n), .single(single),
    .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in_data),
    .out_valid(c_out_valid), .out_data(c_out_data),
    .out_free(10'(out_free)),
    .busy(busy), .ntt_busy(ntt_busy));

  async_fifo #(.W(BW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .wclk(clk), .wrst_n(rst_n), .wvalid(c_out_valid), .wready(out_wready_unused),
    .wdata(c_out_data), .wfree(out_free),
    .rclk(link_clk), .rrst_n(link_rst_n), .rvalid(tx_valid), .rready(tx_ready), .rdata(tx_data));

  // the core only emits while the output FIFO has room
  always_ff @(posedge clk) begin
    if (rst_n && c_out_valid) assert (out_free != '0) else $error("output FIFO overflow");
  end
endmodule
