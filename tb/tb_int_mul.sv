// tb_int_mul: drives a new random operand pair every cycle and checks each
// 64-bit product exactly two cycles later, including the all-ones corner.
module tb_int_mul;
  logic clk = 0;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  longint unsigned exp_q [$];
  always #5 clk = ~clk;
  int_mul #(.K(32)) dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    longint unsigned hist [3];
    for (int i = 0; i < 3000; i++) begin
      a = (i == 5) ? 32'hFFFF_FFFF : $urandom;
      b = (i == 5) ? 32'hFFFF_FFFF : $urandom;
      hist[i % 3] = 64'(a) * 64'(b);
      @(posedge clk); #1;
      if (i >= 1) begin
        // value issued two cycles ago (before the edge just passed, i-1)
        checks++;
        if (p !== hist[(i - 1) % 3]) begin
          failures++;
          $display("FAIL cycle %0d p=%h exp=%h", i, p, hist[(i - 1) % 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
