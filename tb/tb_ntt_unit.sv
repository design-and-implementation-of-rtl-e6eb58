// tb_ntt_unit: runs the butterfly in each of its three modes, a new random
// butterfly every cycle, with 27- and 32-bit primes, and checks both outputs
// exactly five cycles after the inputs:
//   forward  (u+v, w(u-v)),  inverse (u+wv, u-wv),  multiply (wu).
// w is supplied in Montgomery form (w * 2^33 mod q). Between modes the
// pipeline is allowed to empty, as the controller does.
module tb_ntt_unit;
  import ntt_ref_pkg::*;
  import ntt_pkg::*;
  localparam int LAT = 5;
  logic clk = 0;
  bf_mode_t mode;
  logic [31:0] u, v, w, q, y0, y1;
  int checks = 0, failures = 0;
  u64 e0 [64], e1 [64];
  always #5 clk = ~clk;
  ntt_unit #(.K(32)) dut (.clk(clk), .mode(mode), .u(u), .v(v), .w(w), .q(q), .y0(y0), .y1(y1));

  task automatic run(bf_mode_t md, u64 qq, int cnt);
    mode = md;
    q = 32'(qq);
    for (int i = 0; i < cnt + LAT - 1; i++) begin
      u64 uu, vv, ww;
      uu = $urandom % qq; vv = $urandom % qq; ww = $urandom % qq;
      u = 32'(uu); v = 32'(vv); w = 32'(to_mont(ww, qq));
      case (md)
        BF_DIF: begin e0[i % 64] = addmod(uu, vv, qq); e1[i % 64] = mulmod(submod(uu, vv, qq), ww, qq); end
        BF_DIT: begin e0[i % 64] = addmod(uu, mulmod(ww, vv, qq), qq); e1[i % 64] = submod(uu, mulmod(ww, vv, qq), qq); end
        default: begin e0[i % 64] = mulmod(ww, uu, qq); e1[i % 64] = 0; end
      endcase
      @(posedge clk); #1;
      if (i >= LAT - 1) begin
        int k;
        k = (i - (LAT - 1)) % 64;
        checks++;
        if (64'(y0) != e0[k] || (md != BF_MUL && 64'(y1) != e1[k])) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d i=%0d y0=%0d/%0d y1=%0d/%0d", md, i, y0, e0[k], y1, e1[k]);
        end
      end
    end
    repeat (LAT + 1) @(posedge clk);
  endtask

  initial begin
    run(BF_DIF, Q32, 500);
    run(BF_DIT, Q32, 500);
    run(BF_MUL, Q32, 500);
    run(BF_DIF, Q27, 300);
    run(BF_DIT, Q27, 300);
    run(BF_MUL, Q22, 300);
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
