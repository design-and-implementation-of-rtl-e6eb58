// ntt_ctrl: sequencer of the polynomial multiplier. After start it issues,
// one word per cycle, the work of
//   NTT(u) ; u.p0 ; INTT ; u.p1 ; INTT          (single = 0, two products)
//   NTT(u) ; u.p0 ; INTT                        (single = 1, one product)
// A transform is 10 stages of 8 cycles (64 butterflies x 8 = 512 per stage);
// an inner product is 16 cycles (64 products per cycle). The forward
// transform runs spans 512..1, the inverse spans 1..512.
// Stages with span >= 8 all read bank address = cycle, so one stage's write
// of a word (issue + 7 cycles) lands before the next stage reads it
// (issue + 8): such stages run back to back, as the published 8-cycle
// write-back window intends. Stages with span < 8 read address
// cycle ^ bank[2:0]; at the change between the two access patterns, and
// between operations, the controller idles GAP = 6 cycles so that all
// writes in flight land first. That stall rule is this design's own.
// Interface: start (one cycle, ignored while busy), single; issue is the
// per-cycle work word; done pulses once, in the cycle after the last
// result has been written.
module ntt_ctrl
  import ntt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   single,
  output issue_t issue,
  output logic   busy,
  output logic   done
);
  localparam int unsigned GAP = 1 + BF_LAT;   // read + butterfly

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_GAP} state_t;

  typedef struct packed {
    op_t        op;
    logic [3:0] first;   // first stage
    logic [3:0] last;    // last stage
    logic       down;    // stages count down
    logic       dst;
  } phase_t;

  function automatic phase_t phase_info(input logic [2:0] ph);
    case (ph)
      3'd0:    return '{OP_NTT,  4'd9, 4'd3, 1'b1, 1'b0};
      3'd1:    return '{OP_NTT,  4'd2, 4'd0, 1'b1, 1'b0};
      3'd2:    return '{OP_PWM0, 4'd0, 4'd0, 1'b0, 1'b0};
      3'd3:    return '{OP_INTT, 4'd0, 4'd2, 1'b0, 1'b0};
      3'd4:    return '{OP_INTT, 4'd3, 4'd9, 1'b0, 1'b0};
      3'd5:    return '{OP_PWM1, 4'd0, 4'd0, 1'b0, 1'b1};
      3'd6:    return '{OP_INTT, 4'd0, 4'd2, 1'b0, 1'b1};
      default: return '{OP_INTT, 4'd3, 4'd9, 1'b0, 1'b1};
    endcase
  endfunction

  state_t     state;
  logic [2:0] phase;
  logic [3:0] stage, cyc;
  logic [3:0] gap_cnt;
  logic       single_r;
  phase_t     pi;
  logic [3:0] last_cyc;
  logic       last_phase;

  assign pi         = phase_info(phase);
  assign last_cyc   = (pi.op == OP_PWM0 || pi.op == OP_PWM1) ? 4'd15 : 4'd7;
  assign last_phase = single_r ? (phase == 3'd4) : (phase == 3'd7);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= '0;
      stage    <= '0;
      cyc      <= '0;
      gap_cnt  <= '0;
      single_r <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          phase    <= 3'd0;
          stage    <= phase_info(3'd0).first;
          cyc      <= '0;
          single_r <= single;
        end
        S_RUN: begin
          if (cyc == last_cyc) begin
            cyc <= '0;
            if (stage == pi.last) begin
              state   <= S_GAP;
              gap_cnt <= '0;
            end else begin
              stage <= pi.down ? stage - 4'd1 : stage + 4'd1;
            end
          end else begin
            cyc <= cyc + 4'd1;
          end
        end
        default: begin // S_GAP
          if (gap_cnt == 4'(GAP - 1)) begin
            if (last_phase) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              phase <= phase + 3'd1;
              stage <= phase_info(phase + 3'd1).first;
            end
          end else begin
            gap_cnt <= gap_cnt + 4'd1;
          end
        end
      endcase
    end
  end

  always_comb begin
    issue.valid = (state == S_RUN);
    issue.op    = pi.op;
    issue.stage = stage;
    issue.cyc   = cyc;
    issue.dst   = pi.dst;
  end
  assign busy = (state != S_IDLE);
endmodule
