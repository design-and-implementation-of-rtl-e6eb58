// tb_async_fifo: writes 3000 numbered beats from a 250 MHz clock and reads
// them on a 200 MHz clock, both sides with random stalls, and checks that
// every beat arrives once and in order. A phase with the reader stopped
// fills the FIFO: wready must fall after exactly DEPTH beats and wfree must
// reach 0; the FIFO must then drain back to empty.
module tb_async_fifo;
  localparam int DEPTH = 64;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wvalid, wready, rvalid, rready;
  logic [127:0] wdata, rdata;
  logic [6:0] wfree;
  int checks = 0, failures = 0;
  int wr_n = 0, rd_n = 0;
  bit stop_reader = 0;
  int full_seen = 0;
  always #2 wclk = ~wclk;
  always #2.5 rclk = ~rclk;
  async_fifo #(.W(128), .DEPTH(DEPTH)) dut (.wclk(wclk), .wrst_n(wrst_n), .wvalid(wvalid),
    .wready(wready), .wdata(wdata), .wfree(wfree), .rclk(rclk), .rrst_n(rrst_n),
    .rvalid(rvalid), .rready(rready), .rdata(rdata));

  // reader
  always @(posedge rclk) begin
    if (rrst_n && rvalid && rready) begin
      checks++;
      if (rdata !== {4{32'(rd_n)}}) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h", rd_n, rdata);
      end
      rd_n++;
    end
    rready <= !stop_reader && ($urandom % 4 != 0);
  end

  initial begin
    wvalid = 0; wdata = '0; rready = 0;
    repeat (4) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // phase 1: fill with the reader stopped
    stop_reader = 1;
    while (wr_n < DEPTH + 5) begin
      @(negedge wclk);
      wvalid = 1; wdata = {4{32'(wr_n)}};
      @(posedge wclk);
      if (wready) wr_n++;
      else begin full_seen++; break; end
    end
    @(negedge wclk); wvalid = 0;
    checks++;
    if (full_seen == 0 || wr_n != DEPTH || wfree != 0) begin
      failures++; $display("FAIL fill: wr_n=%0d full=%0d wfree=%0d", wr_n, full_seen, wfree);
    end
    // phase 2: random traffic on both sides
    stop_reader = 0;
    while (wr_n < 3000) begin
      @(negedge wclk);
      wvalid = ($urandom % 3 != 0); wdata = {4{32'(wr_n)}};
      @(posedge wclk);
      if (wvalid && wready) wr_n++;
    end
    @(negedge wclk); wvalid = 0;
    repeat (2000) @(posedge rclk);
    checks++;
    if (rd_n != 3000 || rvalid || wfree != 7'(DEPTH)) begin
      failures++; $display("FAIL drain: rd_n=%0d rvalid=%0d wfree=%0d", rd_n, rvalid, wfree);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
