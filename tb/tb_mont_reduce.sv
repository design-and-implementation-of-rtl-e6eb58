// tb_mont_reduce: feeds products c = a*b of fully reduced operands, one per
// cycle, for 22-, 27- and 32-bit NTT-friendly primes and checks that the
// result, two cycles later, equals c * 2^-33 mod q and is below q. Operand
// extremes (0, q-1) are included.
module tb_mont_reduce;
  import ntt_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0;
  logic [63:0] c;
  logic [31:0] q, res;
  int checks = 0, failures = 0;
  u64 exp [4096];
  always #5 clk = ~clk;
  mont_reduce #(.K(32), .W(11), .ITER(3)) dut (.clk(clk), .c(c), .q(q), .res(res));

  initial begin
    u64 qs [3] = '{Q22, Q27, Q32};
    int n;
    n = 0;
    foreach (qs[k]) begin
      u64 rinv;
      rinv = invmod(rmod(qs[k]), qs[k]);
      for (int i = 0; i < 1000; i++) begin
        u64 a, b;
        a = (i == 0) ? qs[k] - 1 : (i == 1) ? 0 : ($urandom % qs[k]);
        b = (i == 0) ? qs[k] - 1 : ($urandom % qs[k]);
        c = a * b;
        q = 32'(qs[k]);
        exp[n] = mulmod(mulmod(a, b, qs[k]), rinv, qs[k]);
        @(posedge clk); #1;
        if (n >= LAT - 1 && (n - (LAT - 1)) / 1000 == k) begin
          checks++;
          if (64'(res) != exp[n - (LAT - 1)]) begin
            failures++;
            if (failures < 10) $display("FAIL q=%0d got %0d exp %0d", qs[k], res, exp[n - (LAT - 1)]);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
