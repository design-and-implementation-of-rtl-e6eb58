// tb_mod_mul: one Montgomery multiplication per cycle with 22-, 27- and
// 32-bit primes; each result must appear exactly four cycles after its
// operands and equal a * b * 2^-33 mod q. It also checks that with
// b = x * 2^33 mod q the product is the ordinary a * x mod q.
module tb_mod_mul;
  import ntt_ref_pkg::*;
  localparam int LAT = 4;
  logic clk = 0;
  logic [31:0] a, b, q, p;
  int checks = 0, failures = 0;
  u64 exp [4096];
  int qk [4096];
  always #5 clk = ~clk;
  mod_mul #(.K(32)) dut (.clk(clk), .a(a), .b(b), .q(q), .p(p));

  initial begin
    u64 qs [3] = '{Q22, Q27, Q32};
    int n;
    n = 0;
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 1000; i++) begin
        u64 x, y;
        x = $urandom % qs[k];
        y = $urandom % qs[k];
        a = 32'(x);
        q = 32'(qs[k]);
        if (i % 2 == 0) begin
          b = 32'(to_mont(y, qs[k]));
          exp[n] = mulmod(x, y, qs[k]);
        end else begin
          b = 32'(y);
          exp[n] = mont_ref(x, y, qs[k]);
        end
        qk[n] = k;
        @(posedge clk); #1;
        if (n >= LAT - 1) begin
          checks++;
          if (64'(p) != exp[n - (LAT - 1)]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, p, exp[n - (LAT - 1)]);
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
