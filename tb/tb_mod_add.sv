// tb_mod_add: checks the partial modular adder against (a + b) mod q for
// fully reduced inputs with 22-, 27- and 32-bit primes, and for lazy inputs
// (any 32-bit a, b) with a 32-bit prime, where the result must stay below
// 2^32 and be congruent to a + b. Includes the extreme operands.
module tb_mod_add;
  import ntt_ref_pkg::*;
  logic [31:0] a, b, q, c;
  int checks = 0, failures = 0;
  mod_add #(.K(32)) dut (.a(a), .b(b), .q(q), .c(c));

  task automatic check(u64 qq, u64 aa, u64 bb, bit full);
    u64 exp;
    q = 32'(qq); a = 32'(aa); b = 32'(bb);
    #1;
    exp = (aa + bb) % qq;
    checks++;
    if ((64'(c) % qq) != exp || (full && 64'(c) >= qq)) begin
      failures++;
      $display("FAIL q=%0d a=%0d b=%0d c=%0d", qq, aa, bb, c);
    end
  endtask

  initial begin
    u64 qs [3] = '{Q22, Q27, Q32};
    foreach (qs[k]) begin
      check(qs[k], qs[k] - 1, qs[k] - 1, 1);
      check(qs[k], 0, 0, 1);
      for (int i = 0; i < 2000; i++) check(qs[k], $urandom % qs[k], $urandom % qs[k], 1);
    end
    check(Q32, 64'hFFFF_FFFF, 64'hFFFF_FFFF, 0);
    check(Q32, 0, 64'hFFFF_FFFF, 0);
    check(Q32, 64'hFFFF_FFFF, 0, 0);
    for (int i = 0; i < 2000; i++) check(Q32, $urandom, $urandom, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
