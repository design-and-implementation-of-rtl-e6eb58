// tb_ntt_accel_top: end-to-end test of the accelerator at its default size,
// with the link clock at 250 MHz and the datapath clock at 200 MHz. The
// host side loads the modulus, twiddles, Psi tables and keys (27-bit prime),
// then sends eight jobs back to back over the link stream, mixing
// two-product and one-product (single mode) jobs. The receiver holds
// tx_ready low for a long stretch at first and then takes beats at random. Every returned
// coefficient is compared with a schoolbook product mod (x^1024 + 1, q).
// Mechanisms counted, each of which must happen at least once: forward NTT,
// inner product with p0 and with p1, inverse NTT, pipeline drain gaps,
// two-product and one-product jobs, transforms running while the core
// loads or emits another job, output credit throttle (output FIFO nearly full), link receive backpressure (input FIFO full) and link
// transmit backpressure. The datapath busy time per job is checked against
// the schedule (320 / 206 cycles).
module tb_ntt_accel_top;
  import ntt_ref_pkg::*;
  import ntt_pkg::*;
  logic link_clk = 0, link_rst_n = 0, clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  logic [127:0] rx_data = '0, tx_data;
  logic single;
  logic cfg_we = 0;
  cfg_sel_t cfg_sel = CFG_MODULUS;
  logic [12:0] cfg_addr = 0;
  logic [31:0] cfg_data = 0;
  logic busy, ntt_busy;
  int checks = 0, failures = 0;
  always #2 link_clk = ~link_clk;
  always #2.5 clk = ~clk;

  ntt_accel_top dut (.link_clk(link_clk), .link_rst_n(link_rst_n), .rx_valid(rx_valid),
    .rx_ready(rx_ready), .rx_data(rx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .tx_data(tx_data), .clk(clk), .rst_n(rst_n), .single(single), .cfg_we(cfg_we),
    .cfg_sel(cfg_sel), .cfg_addr(cfg_addr), .cfg_data(cfg_data), .busy(busy), .ntt_busy(ntt_busy));

  localparam int NJOB = 8;
  bit    modes [NJOB] = '{0, 1, 0, 1, 1, 0, 1, 1};
  poly_t us [NJOB];
  poly_t p0, p1;
  poly_t e0 [NJOB], e1 [NJOB];

  // ---- mechanism counters
  int n_ntt = 0, n_pwm0 = 0, n_pwm1 = 0, n_intt = 0, n_gap = 0;
  int n_double = 0, n_single = 0, n_throttle = 0, n_rx_bp = 0, n_tx_bp = 0;
  int n_overlap = 0, jobs_started = 0, jobs_done = 0, busy_cycles = 0;
  int job_busy [NJOB];
  logic was_gap = 0;
  assign single = modes[(jobs_started < NJOB) ? jobs_started : NJOB - 1];
  always @(posedge clk) if (rst_n) begin
    issue_t is;
    is = dut.u_core.iss;
    if (is.valid && is.cyc == 0) begin
      case (is.op)
        OP_NTT:  n_ntt++;
        OP_PWM0: n_pwm0++;
        OP_PWM1: n_pwm1++;
        default: n_intt++;
      endcase
    end
    if (int'(dut.u_core.u_ctrl.state) == 2 && !was_gap) n_gap++;
    was_gap <= (int'(dut.u_core.u_ctrl.state) == 2);
    if (dut.u_core.ld_accept && dut.u_core.ld_cnt == 0) begin
      if (single) n_single++; else n_double++;
      jobs_started <= jobs_started + 1;
    end
    if (dut.u_core.r_full != 0 && !dut.u_core.out_issue) n_throttle++;
    if (ntt_busy && (dut.u_core.ld_accept || dut.u_core.out_valid)) n_overlap++;
    if (ntt_busy) busy_cycles++;
    if (dut.u_core.u_ctrl.done) begin
      if (jobs_done < NJOB) job_busy[jobs_done] = busy_cycles;
      jobs_done <= jobs_done + 1;
      busy_cycles = 0;
    end
  end
  always @(posedge link_clk) begin
    if (rx_valid && !rx_ready) n_rx_bp++;
    if (tx_valid && !tx_ready) n_tx_bp++;
  end

  // ---- configuration (datapath clock)
  task automatic cfg(cfg_sel_t s, int a, u64 d);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_addr = 13'(a); cfg_data = 32'(d);
  endtask

  task automatic configure(u64 q, u64 psi);
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

  // ---- receiver (link clock)
  int rx_job = 0, rx_beat = 0;
  bit hold_tx = 1;
  always @(posedge link_clk) begin
    if (link_rst_n && tx_valid && tx_ready && rx_job < NJOB) begin
      for (int l = 0; l < 4; l++) begin
        int i;
        logic [31:0] e;
        i = (4 * rx_beat + l) % 1024;
        e = (rx_beat < 256) ? e0[rx_job][i] : e1[rx_job][i];
        checks++;
        if (tx_data[32*l +: 32] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL job %0d coef %0d product %0d: got %0d exp %0d",
                                      rx_job, i, rx_beat / 256, tx_data[32*l +: 32], e);
        end
      end
      rx_beat++;
      if (rx_beat == (modes[rx_job] ? 256 : 512)) begin rx_beat = 0; rx_job++; end
    end
    tx_ready <= !hold_tx && ($urandom % 3 != 0);
  end

  initial begin
    u64 q;
    q = Q27;
    p0 = rand_poly(q); p1 = rand_poly(q);
    for (int j = 0; j < NJOB; j++) begin
      us[j] = rand_poly(q);
      e0[j] = negacyclic(us[j], p0, q);
      if (!modes[j]) e1[j] = negacyclic(us[j], p1, q);
    end
    repeat (4) @(negedge clk);
    rst_n = 1; link_rst_n = 1;
    configure(q, PSI27);
    fork
      // sender: all jobs back to back
      begin
        for (int j = 0; j < NJOB; j++)
          for (int b = 0; b < 256; b++) begin
            @(negedge link_clk);
            rx_valid = 1;
            rx_data = {us[j][4*b+3], us[j][4*b+2], us[j][4*b+1], us[j][4*b]};
            @(posedge link_clk);
            while (!rx_ready) @(posedge link_clk);
          end
        @(negedge link_clk); rx_valid = 0;
      end
      // receiver: stalled until the output FIFO has filled
      begin
        wait (n_throttle > 50 && n_rx_bp > 0);
        hold_tx = 0;
      end
    join
    wait (rx_job == NJOB);
    repeat (50) @(posedge clk);
    for (int j = 0; j < NJOB; j++) begin
      checks++;
      if (job_busy[j] != (modes[j] ? 206 : 320)) begin
        failures++; $display("FAIL job %0d datapath busy %0d cycles", j, job_busy[j]);
      end
    end
    $display("mechanisms: ntt=%0d pwm0=%0d pwm1=%0d intt=%0d gaps=%0d double=%0d single=%0d overlap=%0d throttle=%0d rx_bp=%0d tx_bp=%0d",
             n_ntt, n_pwm0, n_pwm1, n_intt, n_gap, n_double, n_single, n_overlap, n_throttle, n_rx_bp, n_tx_bp);
    checks++;
    if (n_ntt == 0 || n_pwm0 == 0 || n_pwm1 == 0 || n_intt == 0 || n_gap == 0 || n_double == 0 ||
        n_single == 0 || n_overlap == 0 || n_throttle == 0 || n_rx_bp == 0 || n_tx_bp == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (tx_valid) begin failures++; $display("FAIL extra output beats"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic poly_t rand_poly(u64 q);
    poly_t p;
    for (int i = 0; i < 1024; i++) p[i] = 32'($urandom % q);
    return p;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: rx_job=%0d rx_beat=%0d started=%0d done=%0d throttle=%0d rx_bp=%0d tx_bp=%0d",
             rx_job, rx_beat, jobs_started, jobs_done, n_throttle, n_rx_bp, n_tx_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
