// tb_ntt_ctrl: starts the sequencer in two-product and in one-product mode
// and compares every issued word, cycle by cycle, with a schedule built
// here: forward stages 9..3 then 2..0, inner product (16 cycles), inverse
// stages 0..2 then 3..9 (and the second inner product and inverse), 8 cycles
// per stage, 6 idle cycles after every phase, done 7 cycles after the last
// issue. For every transform cycle it also checks, through the bank mapping
// helpers, that the 64 units touch all 128 banks once and that each unit's
// pair is two positions 2^stage apart, so every stage covers all 1024
// positions exactly once. A start while busy must be ignored.
module tb_ntt_ctrl;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, single = 0;
  issue_t issue;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ntt_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .single(single),
    .issue(issue), .busy(busy), .done(done));

  typedef struct { logic valid; op_t op; int stage; int cyc; logic dst; logic done; } ev_t;
  ev_t sched [$];

  task automatic add_phase(op_t op, int s0, int s1, logic dst);
    int step;
    step = (s1 >= s0) ? 1 : -1;
    if (op == OP_PWM0 || op == OP_PWM1) begin
      for (int c = 0; c < 16; c++) sched.push_back('{1, op, 0, c, dst, 0});
    end else begin
      for (int s = s0; s != s1 + step; s += step)
        for (int c = 0; c < 8; c++) sched.push_back('{1, op, s, c, dst, 0});
    end
    for (int g = 0; g < 6; g++) sched.push_back('{0, OP_NTT, 0, 0, 0, 0});
  endtask

  task automatic build(bit one);
    sched = {};
    add_phase(OP_NTT, 9, 3, 0);
    add_phase(OP_NTT, 2, 0, 0);
    add_phase(OP_PWM0, 0, 0, 0);
    add_phase(OP_INTT, 0, 2, 0);
    add_phase(OP_INTT, 3, 9, 0);
    if (!one) begin
      add_phase(OP_PWM1, 0, 0, 1);
      add_phase(OP_INTT, 0, 2, 1);
      add_phase(OP_INTT, 3, 9, 1);
    end
    sched.push_back('{0, OP_NTT, 0, 0, 0, 1});
  endtask

  bit seen [1024];
  task automatic check_cover(issue_t is);
    bit banks [128];
    int s;
    s = int'(is.stage);
    foreach (banks[b]) banks[b] = 0;
    for (int u = 0; u < 64; u++) begin
      logic [2:0] j;
      logic [6:0] bt, bb;
      logic [2:0] at, ab;
      int it, ib;
      j  = pair_bit(is.stage);
      bt = insert_bit(6'(u), j, top_bit(j, is.cyc[2:0]));
      bb = bt ^ (7'd1 << j);
      at = stage_addr(is.stage, is.cyc[2:0], bt);
      ab = stage_addr(is.stage, is.cyc[2:0], bb);
      it = int'({bt ^ {4'b0, at}, at});
      ib = int'({bb ^ {4'b0, ab}, ab});
      checks++;
      if (banks[bt] || banks[bb] || ib != it + (1 << s) || ((it >> s) & 1) != 0 || seen[it] || seen[ib]) begin
        failures++;
        if (failures < 10) $display("FAIL cover stage %0d cyc %0d unit %0d it=%0d ib=%0d", s, is.cyc, u, it, ib);
      end
      banks[bt] = 1; banks[bb] = 1; seen[it] = 1; seen[ib] = 1;
    end
  endtask

  task automatic run(bit one);
    build(one);
    @(negedge clk); start = 1; single = one;
    @(negedge clk); start = 0; single = 0;
    foreach (sched[k]) begin
      ev_t e;
      e = sched[k];
      if (k == 3) start = 1;          // ignored while busy
      if (k == 4) start = 0;
      if (issue.valid && (issue.op == OP_NTT || issue.op == OP_INTT)) begin
        if (issue.cyc == 0) foreach (seen[i]) seen[i] = 0;
        check_cover(issue);
        if (issue.cyc == 7) begin
          int n;
          n = 0;
          foreach (seen[i]) n += seen[i];
          checks++;
          if (n != 1024) begin failures++; $display("FAIL stage %0d covered %0d", issue.stage, n); end
        end
      end
      checks++;
      if (issue.valid !== e.valid || done !== e.done ||
          (e.valid && (issue.op !== e.op || int'(issue.stage) != e.stage || int'(issue.cyc) != e.cyc || issue.dst !== e.dst))) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got v%0d op%0d s%0d c%0d d%0d done%0d exp v%0d op%0d s%0d c%0d done%0d",
          k, issue.valid, issue.op, issue.stage, issue.cyc, issue.dst, done, e.valid, e.op, e.stage, e.cyc, e.done);
      end
      @(negedge clk);
    end
    checks++;
    if (busy || issue.valid) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
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
