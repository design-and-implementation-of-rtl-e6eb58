// tb_psi_scaler: loads Psi^i and Psi^-i n^-1 tables (Montgomery form) for the
// 27-bit test prime, streams 256 beats of four random coefficients through
// in both directions, one beat per cycle, and checks every output lane
// against x * Psi^i (input) or x * Psi^-i * n^-1 (output) mod q, with the
// beat number, exactly five cycles after the input beat.
module tb_psi_scaler;
  import ntt_ref_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  logic [31:0] q;
  logic cfg_we, cfg_inv;
  logic [9:0] cfg_addr;
  logic [31:0] cfg_data;
  logic in_valid, inv, out_valid;
  logic [7:0] beat, out_beat;
  logic [3:0][31:0] in_data, out_data;
  int checks = 0, failures = 0;
  u64 exp [256][4];
  always #5 clk = ~clk;
  psi_scaler #(.N(1024), .LANES(4), .K(32)) dut (.clk(clk), .rst_n(rst_n), .q(q),
    .cfg_we(cfg_we), .cfg_inv(cfg_inv), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .in_valid(in_valid), .inv(inv), .beat(beat), .in_data(in_data),
    .out_valid(out_valid), .out_beat(out_beat), .out_data(out_data));

  int got_beats;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (64'(out_data[l]) != exp[out_beat][l]) begin
        failures++;
        if (failures < 10) $display("FAIL beat %0d lane %0d got %0d exp %0d", out_beat, l, out_data[l], exp[out_beat][l]);
      end
    end
    got_beats++;
  end

  task automatic stream(bit dir);
    u64 qq, psi, ninv, f;
    qq = Q27; psi = PSI27; ninv = invmod(1024, qq);
    for (int b = 0; b < 256; b++) begin
      @(negedge clk);
      in_valid = 1; inv = dir; beat = 8'(b);
      for (int l = 0; l < 4; l++) begin
        u64 x;
        int i;
        i = 4 * b + l;
        x = $urandom % qq;
        in_data[l] = 32'(x);
        f = dir ? mulmod(invmod(powmod(psi, 64'(i), qq), qq), ninv, qq) : powmod(psi, 64'(i), qq);
        exp[b][l] = mulmod(x, f, qq);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
  endtask

  initial begin
    int start_cycle;
    u64 qq, psi, ninv;
    qq = Q27; psi = PSI27; ninv = invmod(1024, qq);
    q = 32'(qq); cfg_we = 0; cfg_inv = 0; cfg_addr = 0; cfg_data = 0;
    in_valid = 0; inv = 0; beat = 0; in_data = '0; got_beats = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_inv = 0; cfg_addr = 10'(i); cfg_data = 32'(to_mont(powmod(psi, 64'(i), qq), qq));
      @(negedge clk);
      cfg_inv = 1; cfg_data = 32'(to_mont(mulmod(invmod(powmod(psi, 64'(i), qq), qq), ninv, qq), qq));
    end
    @(negedge clk); cfg_we = 0;
    // latency: first output exactly LAT cycles after the first input beat
    fork
      stream(0);
      begin
        @(posedge clk iff in_valid);
        start_cycle = 0;
        while (!out_valid) begin @(posedge clk); start_cycle++; end
        checks++;
        if (start_cycle != LAT) begin failures++; $display("FAIL latency %0d", start_cycle); end
      end
    join
    stream(1);
    checks++;
    if (got_beats != 512) begin failures++; $display("FAIL beats %0d", got_beats); end
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
