// poly_mult_core: the NTT-based polynomial multiplier, running in the
// datapath clock domain. For a polynomial u of length n = 1024 it returns
//   u*p0 and u*p1 in Z_q[x]/(x^n + 1)       (single = 0)
//   u*p0                                    (single = 1)
// where p0, p1 were stored beforehand in the NTT domain.
//
// Operation (one "multiplication job"):
//  1. Load: 256 beats of four coefficients arrive on in_*; each coefficient
//     is multiplied by Psi^i on the way in (psi_scaler) and written into
//     input buffer A0 or A1 (position i -> bank (i>>3)^(i&7), address i&7).
//  2. Compute (ntt_ctrl): forward NTT of A in place by 64 butterflies in
//     decimation-in-frequency form, leaving A in scrambled (bit-reversed)
//     order; inner product A.p0 -> R0 with the butterflies' multipliers;
//     inverse NTT of R0 in place in decimation-in-time form, which takes the
//     scrambled order back to natural order; then the same for p1 -> R1.
//  3. Output: R0 (then R1) is read in natural order, four coefficients per
//     beat, multiplied by Psi^-i * n^-1 on the way out, and sent on out_*.
// The three steps overlap across jobs: there are two input buffers and two
// result sets {R0,R1}, so job k+1 loads and job k-1 drains while job k is
// computed. The mode (single) is sampled with the first input beat of a job.
// Every multiplication is a Montgomery product with R = 2^33, so all stored
// constants (twiddles, keys, Psi tables) are given times 2^33 mod q.
//
// Interconnect: in a stage of span 2^s the butterfly partners sit in banks
// that differ in bit j = (s >= 3 ? s-3 : s); unit u serves the two banks
// obtained by inserting a bit at position j of u, and every bank is read and
// written once per cycle. Reads are issued at cycle t, the butterfly sees
// the data at t+1 and its result is written at t+6.
//
// Interfaces:
//  in_valid/in_ready/in_data: 128-bit beats of u, coefficient 4b+l in lane l.
//  out_valid/out_data: result beats; issued only while out_free >= 8 (free
//   entries downstream), so no ready is needed.
//  cfg_we/cfg_sel/cfg_addr/cfg_data: host writes of q, twiddle tables, Psi
//   tables and keys (layouts in ntt_pkg::cfg_sel_t); only while busy is low.
//  busy: some job is loading, computing or draining;
//  ntt_busy: the transform datapath is running.
// The 64 units, 128 banks of 8, 5-cycle butterfly, input/output Psi
// multiplication, the NTT / inner product / INTT order and the overlap of
// I/O with computation are the published design; bank placement,
// interconnect, stall rule, memory count, double buffering and the
// handshake are this design's own.
module poly_mult_core
  import ntt_pkg::*;
#(
  parameter int unsigned N    = 1024,
  parameter int unsigned NBFU = 64,
  parameter int unsigned K    = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    single,
  // configuration
  input  logic                    cfg_we,
  input  cfg_sel_t                cfg_sel,
  input  logic [12:0]             cfg_addr,
  input  logic [K-1:0]            cfg_data,
  // input stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [NUM_LANES*K-1:0]      in_data,
  // output stream
  output logic                    out_valid,
  output logic [NUM_LANES*K-1:0]      out_data,
  input  logic [9:0]              out_free,
  // status
  output logic                    busy,
  output logic                    ntt_busy
);
  localparam int unsigned NB   = 2 * NBFU;     // banks
  localparam int unsigned BW   = $clog2(N / NUM_LANES);

  // the index arithmetic below is written for the published size
  initial begin
    assert (N == ntt_pkg::POLY_N && NBFU == ntt_pkg::NUM_BFU && K == ntt_pkg::COEF_W)
      else $error("poly_mult_core supports only N=1024, NBFU=64, K=32");
  end

  // ------------------------------------------------------------------
  // modulus
  logic [K-1:0] q;
  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else if (cfg_we && cfg_sel == CFG_MODULUS) q <= cfg_data;
  end

  // ------------------------------------------------------------------
  // job sequencing: loader, compute and output run concurrently on
  // ping-pong buffers (A0/A1 for inputs, result sets 0/1 for R0/R1 pairs)
  logic [1:0]   a_full, a_mode, r_full, r_mode;
  logic         ld_buf;                  // buffer taking input beats
  logic [1+MUL_LAT-1:0] ld_buf_sr;      // its copy alongside the input scaler
  logic         isc_buf;
  logic [BW:0]  ld_cnt;
  logic         cp, rp, comp_busy;       // next A / result set for compute
  logic         cur_a, cur_r;            // buffers of the running computation
  logic         op_set;                  // result set being emitted
  logic [BW:0]  out_cnt, out_total;
  logic         ctrl_start, ctrl_done, ctrl_busy, comp_go;
  issue_t       iss;
  logic [3:0]   inflight;
  logic         out_issue, ld_accept;

  logic                         isc_out_valid, osc_out_valid;
  logic [BW-1:0]                isc_out_beat;
  logic [NUM_LANES-1:0][K-1:0]  isc_out_data, osc_in_data, osc_out_data;

  // a buffer becomes full when its last scaled beat has been written; the
  // loader moves on to the other buffer as soon as that beat is taken
  assign in_ready  = !a_full[ld_buf];
  assign isc_buf   = ld_buf_sr[MUL_LAT];
  assign ld_accept = in_valid && in_ready;
  assign comp_go   = !comp_busy && !ctrl_start && a_full[cp] && !r_full[rp];
  assign out_total = r_mode[op_set] ? (BW+1)'(N / NUM_LANES) : (BW+1)'(2 * N / NUM_LANES);
  assign out_issue = r_full[op_set] && (out_free >= 10'd8);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_full <= '0; a_mode <= '0; r_full <= '0; r_mode <= '0;
      ld_buf <= 1'b0; ld_buf_sr <= '0; ld_cnt <= '0;
      cp <= 1'b0; rp <= 1'b0; comp_busy <= 1'b0; cur_a <= 1'b0; cur_r <= 1'b0;
      op_set <= 1'b0; out_cnt <= '0;
      ctrl_start <= 1'b0; inflight <= '0;
    end else begin
      ctrl_start <= 1'b0;
      ld_buf_sr  <= {ld_buf_sr[MUL_LAT-1:0], ld_buf};
      inflight   <= inflight + 4'(out_issue) - 4'(osc_out_valid);
      // loader
      if (ld_accept) begin
        if (ld_cnt == '0) a_mode[ld_buf] <= single;
        if (ld_cnt == (BW+1)'(N / NUM_LANES - 1)) begin
          ld_buf <= ~ld_buf;
          ld_cnt <= '0;
        end else begin
          ld_cnt <= ld_cnt + 1'b1;
        end
      end
      if (isc_out_valid && isc_out_beat == BW'(N / NUM_LANES - 1)) a_full[isc_buf] <= 1'b1;
      // compute
      if (comp_go) begin
        ctrl_start <= 1'b1;
        comp_busy  <= 1'b1;
        cur_a      <= cp;
        cur_r      <= rp;
      end
      if (ctrl_done) begin
        comp_busy     <= 1'b0;
        a_full[cur_a] <= 1'b0;
        r_full[cur_r] <= 1'b1;
        r_mode[cur_r] <= a_mode[cur_a];
        cp            <= ~cp;
        rp            <= ~rp;
      end
      // output: a result set is released once its last beat has been read
      // (the read data is already in the memory output registers)
      if (out_issue) begin
        if (out_cnt == out_total - 1'b1) begin
          out_cnt        <= '0;
          r_full[op_set] <= 1'b0;
          op_set         <= ~op_set;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end
  assign busy = (ld_cnt != '0) || isc_out_valid || (inflight != '0) || (a_full != '0) || comp_busy || (r_full != '0);

  ntt_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(ctrl_start), .single(a_mode[cur_a]),
    .issue(iss), .busy(ctrl_busy), .done(ctrl_done));
  assign ntt_busy = ctrl_busy;

  // ------------------------------------------------------------------
  // memories: A0/A1 (inputs, then their transforms), result sets 0/1 of
  // R0/R1 (products), K0/K1 (keys)
  logic [1:0][NB-1:0]             a_re, a_we;
  logic [1:0][NB-1:0][2:0]        a_ra, a_wa;
  logic [1:0][NB-1:0][K-1:0]      a_rd, a_wd;
  logic [1:0][1:0][NB-1:0]        r_re, r_we;
  logic [1:0][1:0][NB-1:0][2:0]   r_ra, r_wa;
  logic [1:0][1:0][NB-1:0][K-1:0] r_rd, r_wd;
  logic [NB-1:0]                  k_re;
  logic [1:0][NB-1:0]             k_we;
  logic [NB-1:0][2:0]             k_ra, k_wa;
  logic [1:0][NB-1:0][K-1:0]      k_rd;
  logic [NB-1:0][K-1:0]           k_wd;

  for (genvar x = 0; x < 2; x++) begin : g_buf
    poly_mem #(.BANKS(NB), .DEPTH(BDEPTH), .K(K)) u_mem_a (
      .clk(clk), .re(a_re[x]), .raddr(a_ra[x]), .rdata(a_rd[x]),
      .we(a_we[x]), .waddr(a_wa[x]), .wdata(a_wd[x]));
    for (genvar m = 0; m < 2; m++) begin : g_res
      poly_mem #(.BANKS(NB), .DEPTH(BDEPTH), .K(K)) u_mem_r (
        .clk(clk), .re(r_re[x][m]), .raddr(r_ra[x][m]), .rdata(r_rd[x][m]),
        .we(r_we[x][m]), .waddr(r_wa[x][m]), .wdata(r_wd[x][m]));
    end
    poly_mem #(.BANKS(NB), .DEPTH(BDEPTH), .K(K)) u_mem_k (
      .clk(clk), .re(k_re), .raddr(k_ra), .rdata(k_rd[x]),
      .we(k_we[x]), .waddr(k_wa), .wdata(k_wd));
  end

  // issue word delayed to the butterfly input (d[1]) and write-back (d[6])
  issue_t iss_d [1:BF_LAT+1];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= BF_LAT + 1; i++) iss_d[i] <= '0;
    end else begin
      iss_d[1] <= iss;
      for (int i = 2; i <= BF_LAT + 1; i++) iss_d[i] <= iss_d[i-1];
    end
  end
  issue_t iw;
  assign iw = iss_d[BF_LAT+1];

  // output read (natural order) and its delayed copy for the scaler
  logic [BW-1:0] ob;          // beat being read
  logic          ob_sel;      // R0 or R1
  logic          orv_d;
  logic [BW-1:0] ob_d;
  logic          osel_d;
  logic          oset_d;
  assign ob     = out_cnt[BW-1:0];
  assign ob_sel = out_cnt[BW];
  always_ff @(posedge clk) begin
    orv_d  <= out_issue;
    ob_d   <= ob;
    osel_d <= ob_sel;
    oset_d <= op_set;
  end

  // ------------------------------------------------------------------
  // butterflies and their twiddle memories
  logic [NBFU-1:0][K-1:0] bu, bv, bw, y0, y1, tw_f, tw_i;
  bf_mode_t               bmode;
  logic [6:0]             tw_ra;
  assign tw_ra = 7'(iss.stage * 8) + 7'(iss.cyc[2:0]);

  always_comb begin
    case (iss_d[1].op)
      OP_NTT:  bmode = BF_DIF;
      OP_INTT: bmode = BF_DIT;
      default: bmode = BF_MUL;
    endcase
  end

  for (genvar u = 0; u < NBFU; u++) begin : g_bfu
    logic tw_we;
    assign tw_we = cfg_we && cfg_addr[12:7] == 6'(u);
    sdp_ram #(.DEPTH(TWDEPTH), .K(K)) u_tw_fwd (
      .clk(clk), .we(tw_we && cfg_sel == CFG_TW_FWD), .waddr(cfg_addr[6:0]), .wdata(cfg_data),
      .re(iss.valid), .raddr(tw_ra), .rdata(tw_f[u]));
    sdp_ram #(.DEPTH(TWDEPTH), .K(K)) u_tw_inv (
      .clk(clk), .we(tw_we && cfg_sel == CFG_TW_INV), .waddr(cfg_addr[6:0]), .wdata(cfg_data),
      .re(iss.valid), .raddr(tw_ra), .rdata(tw_i[u]));
    ntt_unit #(.K(K)) u_bf (
      .clk(clk), .mode(bmode), .u(bu[u]), .v(bv[u]), .w(bw[u]), .q(q),
      .y0(y0[u]), .y1(y1[u]));
  end

  // butterfly operand selection (cycle t+1)
  always_comb begin
    issue_t     s;
    logic [2:0] j;
    logic       tb;
    logic [6:0] bt, bb;
    s  = iss_d[1];
    j  = pair_bit(s.stage);
    tb = top_bit(j, s.cyc[2:0]);
    for (int u = 0; u < NBFU; u++) begin
      bt = insert_bit(6'(u), j, tb);
      bb = bt ^ (7'd1 << j);
      case (s.op)
        OP_NTT: begin
          bu[u] = a_rd[cur_a][bt];  bv[u] = a_rd[cur_a][bb];  bw[u] = tw_f[u];
        end
        OP_INTT: begin
          bu[u] = r_rd[cur_r][s.dst][bt];  bv[u] = r_rd[cur_r][s.dst][bb];  bw[u] = tw_i[u];
        end
        OP_PWM0: begin
          bu[u] = a_rd[cur_a][{s.cyc[3], 6'(u)}];  bv[u] = '0;  bw[u] = k_rd[0][{s.cyc[3], 6'(u)}];
        end
        default: begin
          bu[u] = a_rd[cur_a][{s.cyc[3], 6'(u)}];  bv[u] = '0;  bw[u] = k_rd[1][{s.cyc[3], 6'(u)}];
        end
      endcase
    end
  end

  // ------------------------------------------------------------------
  // per-bank read/write port control
  always_comb begin
    logic [2:0]     jw;
    logic           tw;
    logic [5:0]     uw;
    logic [K-1:0]   yv;
    logic [2:0]     wadr;
    logic [LOGN-1:0] idx;
    jw = pair_bit(iw.stage);
    tw = top_bit(jw, iw.cyc[2:0]);
    for (int b = 0; b < NB; b++) begin
      // defaults
      k_re[b] = 1'b0; k_ra[b] = '0;
      for (int x = 0; x < 2; x++) begin
        a_re[x][b] = 1'b0; a_ra[x][b] = '0; a_we[x][b] = 1'b0; a_wa[x][b] = '0; a_wd[x][b] = '0;
        for (int m = 0; m < 2; m++) begin
          r_re[x][m][b] = 1'b0; r_ra[x][m][b] = '0;
          r_we[x][m][b] = 1'b0; r_wa[x][m][b] = '0; r_wd[x][m][b] = '0;
        end
      end
      // reads at issue
      if (iss.valid) begin
        case (iss.op)
          OP_NTT: begin
            a_re[cur_a][b] = 1'b1; a_ra[cur_a][b] = stage_addr(iss.stage, iss.cyc[2:0], 7'(b));
          end
          OP_INTT: begin
            r_re[cur_r][iss.dst][b] = 1'b1; r_ra[cur_r][iss.dst][b] = stage_addr(iss.stage, iss.cyc[2:0], 7'(b));
          end
          default: begin
            a_re[cur_a][b] = 1'b1; a_ra[cur_a][b] = iss.cyc[2:0];
            k_re[b] = 1'b1; k_ra[b] = iss.cyc[2:0];
          end
        endcase
      end
      // write-back at issue + 6
      if (iw.valid) begin
        uw   = remove_bit(7'(b), jw);
        yv   = (((7'(b) >> jw) & 7'd1) == 7'(tw)) ? y0[uw] : y1[uw];
        wadr = stage_addr(iw.stage, iw.cyc[2:0], 7'(b));
        case (iw.op)
          OP_NTT: begin
            a_we[cur_a][b] = 1'b1; a_wa[cur_a][b] = wadr; a_wd[cur_a][b] = yv;
          end
          OP_INTT: begin
            r_we[cur_r][iw.dst][b] = 1'b1; r_wa[cur_r][iw.dst][b] = wadr; r_wd[cur_r][iw.dst][b] = yv;
          end
          default: begin
            if (b[6] == iw.cyc[3]) begin
              r_we[cur_r][iw.dst][b] = 1'b1; r_wa[cur_r][iw.dst][b] = iw.cyc[2:0];
              r_wd[cur_r][iw.dst][b] = y0[b[5:0]];
            end
          end
        endcase
      end
    end
    // loading u: scaled beats into A
    if (isc_out_valid) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        idx = {isc_out_beat, 2'(l)};
        a_we[isc_buf][bank_of(idx)] = 1'b1;
        a_wa[isc_buf][bank_of(idx)] = addr_of(idx);
        a_wd[isc_buf][bank_of(idx)] = isc_out_data[l];
      end
    end
    // emitting results: natural-order reads of R0/R1
    if (out_issue) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        idx = {ob, 2'(l)};
        r_re[op_set][ob_sel][bank_of(idx)] = 1'b1;
        r_ra[op_set][ob_sel][bank_of(idx)] = addr_of(idx);
      end
    end
  end

  // key writes from the host
  always_comb begin
    logic [LOGN-1:0] kidx;
    kidx = cfg_addr[LOGN-1:0];
    for (int m = 0; m < 2; m++) k_we[m] = '0;
    k_wa = '0;
    k_wd = '0;
    if (cfg_we && (cfg_sel == CFG_KEY0 || cfg_sel == CFG_KEY1)) begin
      k_we[cfg_sel == CFG_KEY1][bank_of(kidx)] = 1'b1;
      k_wa[bank_of(kidx)] = addr_of(kidx);
      k_wd[bank_of(kidx)] = cfg_data;
    end
  end

  // ------------------------------------------------------------------
  // Psi scaling: one scaler on the input stream, one on the output stream
  psi_scaler #(.N(N), .LANES(NUM_LANES), .K(K)) u_scale_in (
    .clk(clk), .rst_n(rst_n), .q(q),
    .cfg_we(cfg_we && cfg_sel == CFG_PSI), .cfg_inv(1'b0),
    .cfg_addr(cfg_addr[LOGN-1:0]), .cfg_data(cfg_data),
    .in_valid(ld_accept), .inv(1'b0), .beat(ld_cnt[BW-1:0]), .in_data(in_data),
    .out_valid(isc_out_valid), .out_beat(isc_out_beat), .out_data(isc_out_data));

  always_comb begin
    logic [LOGN-1:0] oi;
    for (int l = 0; l < NUM_LANES; l++) begin
      oi = {ob_d, 2'(l)};
      osc_in_data[l] = r_rd[oset_d][osel_d][bank_of(oi)];
    end
  end

  psi_scaler #(.N(N), .LANES(NUM_LANES), .K(K)) u_scale_out (
    .clk(clk), .rst_n(rst_n), .q(q),
    .cfg_we(cfg_we && cfg_sel == CFG_PSI_INV), .cfg_inv(1'b1),
    .cfg_addr(cfg_addr[LOGN-1:0]), .cfg_data(cfg_data),
    .in_valid(orv_d), .inv(1'b1), .beat(ob_d), .in_data(osc_in_data),
    .out_valid(osc_out_valid), .out_beat(), .out_data(osc_out_data));

  assign out_valid = osc_out_valid;
  assign out_data  = osc_out_data;
endmodule
