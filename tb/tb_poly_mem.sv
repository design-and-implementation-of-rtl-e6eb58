// tb_poly_mem: writes all 1024 words of a 128 x 8 coefficient memory, with
// every bank written in the same cycle at a different address, then reads
// with independent per-bank addresses and checks each bank's word one cycle
// later against a model; also checks that a bank without re holds its data.
module tb_poly_mem;
  localparam int B = 128, D = 8;
  logic clk = 0;
  logic [B-1:0] re, we;
  logic [B-1:0][2:0] raddr, waddr;
  logic [B-1:0][31:0] rdata, wdata;
  logic [31:0] model [B][D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  poly_mem #(.BANKS(B), .DEPTH(D), .K(32)) dut (.clk(clk), .re(re), .raddr(raddr), .rdata(rdata),
    .we(we), .waddr(waddr), .wdata(wdata));

  initial begin
    re = '0; we = '0; raddr = '0; waddr = '0; wdata = '0;
    for (int c = 0; c < D; c++) begin
      @(negedge clk);
      we = '1;
      for (int b = 0; b < B; b++) begin
        waddr[b] = 3'((c + b) % D);
        wdata[b] = $urandom;
        model[b][(c + b) % D] = wdata[b];
      end
    end
    @(negedge clk); we = '0;
    for (int r = 0; r < 50; r++) begin
      logic [B-1:0][2:0] ra;
      logic [B-1:0] en;
      logic [B-1:0][31:0] prev;
      prev = rdata;
      for (int b = 0; b < B; b++) begin ra[b] = 3'($urandom); en[b] = 1'($urandom); end
      @(negedge clk); re = en; raddr = ra;
      @(negedge clk); re = '0;
      for (int b = 0; b < B; b++) begin
        checks++;
        if (rdata[b] !== (en[b] ? model[b][ra[b]] : prev[b])) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d got %h", b, ra[b], rdata[b]);
        end
      end
    end
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
