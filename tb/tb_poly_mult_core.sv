// tb_poly_mult_core: end-to-end check of the multiplier core at full size
// (n = 1024, 64 units, 32-bit datapath). Acting as the host it loads the
// modulus, the per-unit twiddle tables, the Psi tables and the two keys,
// then runs jobs and compares every output coefficient with a schoolbook
// product in Z_q[x]/(x^1024 + 1):
//   job 1: two products, 27-bit prime, random gaps in the input stream
//   job 2: one product (single mode), same prime
//   job 3: two products after reloading everything for a 32-bit prime
//   stream: six jobs sent back to back with modes 0,1,1,1,1,1 and a fast
//     downstream, so loading, computing and draining overlap; the spacing of
//     the single-product jobs must be close to the 256-beat input time
// The downstream buffer is modelled with 16 entries drained at random, so
// the core's credit throttle (out_free < 8) is exercised; overflowing it is
// a failure. The cycles the transform datapath is busy are checked against
// the schedule: 320 for two products, 206 for one.
module tb_poly_mult_core;
  import ntt_ref_pkg::*;
  import ntt_pkg::*;
  logic clk = 0, rst_n = 0, single = 0;
  logic cfg_we = 0;
  cfg_sel_t cfg_sel = CFG_MODULUS;
  logic [12:0] cfg_addr = 0;
  logic [31:0] cfg_data = 0;
  logic in_valid = 0, in_ready, out_valid, busy, ntt_busy;
  logic [127:0] in_data = '0, out_data;
  logic [9:0] out_free;
  int checks = 0, failures = 0;
  int occ = 0, throttled = 0, ntt_cycles = 0, overlap = 0;
  bit fast = 0;
  logic [127:0] got [$];
  always #5 clk = ~clk;

  poly_mult_core dut (.clk(clk), .rst_n(rst_n), .single(single),
    .cfg_we(cfg_we), .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .out_free(out_free),
    .busy(busy), .ntt_busy(ntt_busy));

  // downstream buffer model
  assign out_free = 10'(16 - occ);
  always @(posedge clk) begin
    int nocc;
    nocc = occ;
    if (out_valid) begin got.push_back(out_data); nocc++; end
    if (nocc > 0 && (fast || $urandom % 3 == 0)) nocc--;
    if (nocc > 16) begin failures++; $display("FAIL downstream overflow"); end
    occ <= nocc;
    if (dut.r_full != 0 && out_free < 8) throttled++;
    if (ntt_busy && (in_valid || out_valid)) overlap++;
    if (ntt_busy) ntt_cycles++;
  end

  task automatic cfg(cfg_sel_t s, int a, u64 d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = 13'(a); cfg_data = 32'(d);
  endtask

  task automatic configure(u64 q, u64 psi, poly_t p0, poly_t p1);
    u64 om, omi, ninv, psii;
    poly_t k0, k1;
    om = mulmod(psi, psi, q); omi = invmod(om, q); ninv = invmod(1024, q); psii = invmod(psi, q);
    cfg(CFG_MODULUS, 0, q);
    for (int u = 0; u < 64; u++)
      for (int s = 0; s < 10; s++)
        for (int c = 0; c < 8; c++) begin
          int e;
          e = int'(tw_exp(u, s, c));
          cfg(CFG_TW_FWD, u * 128 + s * 8 + c, to_mont(powmod(om, 64'(e), q), q));
          cfg(CFG_TW_INV, u * 128 + s * 8 + c, to_mont(powmod(omi, 64'(e), q), q));
        end
    for (int i = 0; i < 1024; i++) begin
      cfg(CFG_PSI, i, to_mont(powmod(psi, 64'(i), q), q));
      cfg(CFG_PSI_INV, i, to_mont(mulmod(powmod(psii, 64'(i), q), ninv, q), q));
    end
    k0 = key_image(p0, psi, q);
    k1 = key_image(p1, psi, q);
    for (int i = 0; i < 1024; i++) begin
      cfg(CFG_KEY0, i, k0[i]);
      cfg(CFG_KEY1, i, k1[i]);
    end
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic poly_t rand_poly(u64 q);
    poly_t p;
    for (int i = 0; i < 1024; i++) p[i] = 32'($urandom % q);
    return p;
  endfunction

  task automatic job(bit one, poly_t u, poly_t p0, poly_t p1, u64 q, bit gaps);
    poly_t e0, e1;
    int nb, exp_cycles;
    e0 = negacyclic(u, p0, q);
    if (!one) e1 = negacyclic(u, p1, q);
    got = {};
    ntt_cycles = 0;
    @(negedge clk); single = one;
    for (int b = 0; b < 256; b++) begin
      @(negedge clk);
      while (gaps && ($urandom % 4 == 0)) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_data = {u[4*b+3], u[4*b+2], u[4*b+1], u[4*b]};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    nb = one ? 256 : 512;
    while (got.size() < nb) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != nb) begin failures++; $display("FAIL %0d beats, expected %0d", got.size(), nb); end
    for (int b = 0; b < nb; b++)
      for (int l = 0; l < 4; l++) begin
        int i;
        logic [31:0 ] g, e;
        i = (4 * b + l) % 1024;
        g = got[b][32*l +: 32];
        e = (b < 256) ? e0[i] : e1[i];
        checks++;
        if (g !== e) begin
          failures++;
          if (failures < 10) $display("FAIL job single=%0d coef %0d of product %0d: got %0d exp %0d", one, i, b / 256, g, e);
        end
      end
    exp_cycles = one ? 206 : 320;
    checks++;
    if (ntt_cycles != exp_cycles) begin failures++; $display("FAIL datapath busy %0d cycles, expected %0d", ntt_cycles, exp_cycles); end
    $display("job single=%0d q=%0d: %0d beats, datapath %0d cycles", one, q, got.size(), ntt_cycles);
  endtask

  // back-to-back jobs; returns the cycle at which each job's last beat arrived
  task automatic stream(bit modes[6], poly_t p0, poly_t p1, u64 q);
    poly_t us[6];
    int    ends[6];
    int    nb, total, cyc;
    for (int k = 0; k < 6; k++) us[k] = rand_poly(q);
    got = {};
    total = 0;
    for (int k = 0; k < 6; k++) total += modes[k] ? 256 : 512;
    fast = 1;
    fork
      begin
        for (int k = 0; k < 6; k++)
          for (int b = 0; b < 256; b++) begin
            @(negedge clk);
            in_valid = 1; single = modes[k];
            in_data = {us[k][4*b+3], us[k][4*b+2], us[k][4*b+1], us[k][4*b]};
            @(posedge clk);
            while (!in_ready) @(posedge clk);
          end
        @(negedge clk); in_valid = 0;
      end
      begin
        cyc = 0; nb = 0;
        for (int k = 0; k < 6; k++) begin
          nb += modes[k] ? 256 : 512;
          while (got.size() < nb) begin @(posedge clk); cyc++; end
          ends[k] = cyc;
        end
      end
    join
    fast = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != total) begin failures++; $display("FAIL stream %0d beats, expected %0d", got.size(), total); end
    nb = 0;
    for (int k = 0; k < 6; k++) begin
      poly_t e0, e1;
      e0 = negacyclic(us[k], p0, q);
      if (!modes[k]) e1 = negacyclic(us[k], p1, q);
      for (int b = 0; b < (modes[k] ? 256 : 512); b++) begin
        for (int l = 0; l < 4; l++) begin
          int i;
          logic [31:0] g, e;
          i = (4 * b + l) % 1024;
          g = got[nb + b][32*l +: 32];
          e = (b < 256) ? e0[i] : e1[i];
          checks++;
          if (g !== e) begin
            failures++;
            if (failures < 10) $display("FAIL stream job %0d coef %0d of product %0d: got %0d exp %0d", k, i, b / 256, g, e);
          end
        end
      end
      nb += modes[k] ? 256 : 512;
    end
    // single-product jobs 2..5 must follow each other at the input rate
    checks++;
    if (ends[5] - ends[2] > 3 * 258) begin
      failures++;
      $display("FAIL stream spacing %0d cycles for 3 jobs", ends[5] - ends[2]);
    end
    $display("stream: job ends at %0d %0d %0d %0d %0d %0d, %0d cycles per single job",
             ends[0], ends[1], ends[2], ends[3], ends[4], ends[5], (ends[5] - ends[2]) / 3);
  endtask

  initial begin
    poly_t p0, p1, u;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p0 = rand_poly(Q27); p1 = rand_poly(Q27);
    configure(Q27, PSI27, p0, p1);
    u = rand_poly(Q27);
    job(0, u, p0, p1, Q27, 1);
    u = rand_poly(Q27);
    job(1, u, p0, p1, Q27, 0);
    p0 = rand_poly(Q32); p1 = rand_poly(Q32);
    configure(Q32, PSI32, p0, p1);
    u = rand_poly(Q32);
    job(0, u, p0, p1, Q32, 1);
    stream('{0, 1, 1, 1, 1, 1}, p0, p1, Q32);
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL transforms never overlapped input or output"); end
    $display("datapath busy during input/output in %0d cycles", overlap);
    checks++;
    if (throttled == 0) begin failures++; $display("FAIL output throttle never engaged"); end
    $display("output throttled in %0d cycles", throttled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
