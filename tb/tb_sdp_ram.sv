// tb_sdp_ram: fills an 80-word table memory, reads it back with one cycle
// of read latency, checks that rdata holds when re is low, and that a read
// of the word being written in the same cycle returns the old contents.
module tb_sdp_ram;
  logic clk = 0;
  logic we, re;
  logic [6:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [80];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sdp_ram #(.DEPTH(80), .K(32)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(rdata));

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      we = 1; waddr = 7'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 400; r++) begin
      int a;
      a = $urandom % 80;
      @(negedge clk); re = 1; raddr = 7'(a);
      @(negedge clk); re = 0;
      expect_eq(rdata, model[a], "read");
      @(negedge clk);
      expect_eq(rdata, model[a], "hold");
    end
    // read-during-write returns the old word
    @(negedge clk); we = 1; re = 1; waddr = 7'd9; raddr = 7'd9; wdata = ~model[9];
    @(negedge clk); we = 0; re = 0;
    expect_eq(rdata, model[9], "read-during-write");
    model[9] = ~model[9];
    @(negedge clk); re = 1; raddr = 7'd9;
    @(negedge clk); re = 0;
    expect_eq(rdata, model[9], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
