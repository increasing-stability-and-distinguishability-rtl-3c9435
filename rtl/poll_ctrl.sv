// poll_ctrl: sequencer for one fingerprint poll.
//
// A poll starts from rest: operands at 0 (product 0) and every recorder
// held at its one-hot start. The recorders are then released while the
// product is still 0, the input words are loaded into the LFSRs on one
// clock edge (the operand change that makes the glitches), the LFSRs are
// optionally stepped `steps` more times (each step is a further operand
// change whose glitches add to the counts), the product lines are given
// SETTLE_CYCLES clocks to go quiet, and the counts are captured.
//
// States (df_pkg::poll_state_t), one clock each unless noted:
//   IDLE    wait for start
//   CLEAR   CLEAR_CYCLES clocks: lfsr_clear = 1, rec_preset = 1
//   ARM     rec_preset falls, product still 0
//   LOAD    lfsr_load = 1
//   STEP    `steps` clocks of lfsr_step = 1 (skipped when steps = 0)
//   SETTLE  SETTLE_CYCLES clocks
//   CAPTURE capture = 1; done pulses on the next clock, back to IDLE
// A poll with steps = S takes CLEAR_CYCLES + S + SETTLE_CYCLES + 3 clocks
// from the start pulse to the capture edge, and done is high for one clock
// after it. start is ignored while busy.
//
// rec_preset drives the recorders' asynchronous preset, so it comes
// straight from a flip-flop and cannot glitch itself. It is low out of
// reset and rises at the start of every poll, so each poll begins with a
// fresh preset edge; between polls the recorders keep their counts.
//
// Two assertions check that the recorders are released before the operands
// change. Because they sample rec_preset and rst_n on clk, a linter reports
// both signals as used synchronously and asynchronously; only the
// assertions use them that way.
//
// The published design runs this sequence from software on the embedded
// processor; it gives what a poll does (load the input words, record the
// glitches, read the positions) but not the timing. The state order and
// cycle counts are this design's choice.
module poll_ctrl
  import df_pkg::*;
#(
  parameter int unsigned STEP_W        = 16,
  parameter int unsigned CLEAR_CYCLES  = 2,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [STEP_W-1:0] steps,
  output logic              lfsr_clear,
  output logic              lfsr_load,
  output logic              lfsr_step,
  output logic              rec_preset,
  output logic              capture,
  output logic              busy,
  output logic              done
);

  localparam int unsigned CNT_W = STEP_W > 8 ? STEP_W : 8;

  poll_state_t state, state_nx;
  logic [CNT_W-1:0] cnt, cnt_nx;

  always_comb begin
    state_nx = state;
    cnt_nx   = cnt;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          state_nx = ST_CLEAR;
          cnt_nx   = CNT_W'(CLEAR_CYCLES - 1);
        end
      end
      ST_CLEAR: begin
        if (cnt == '0) state_nx = ST_ARM;
        else           cnt_nx   = cnt - 1'b1;
      end
      ST_ARM: state_nx = ST_LOAD;
      ST_LOAD: begin
        if (steps == '0) begin
          state_nx = ST_SETTLE;
          cnt_nx   = CNT_W'(SETTLE_CYCLES - 1);
        end else begin
          state_nx = ST_STEP;
          cnt_nx   = CNT_W'(steps) - 1'b1;
        end
      end
      ST_STEP: begin
        if (cnt == '0) begin
          state_nx = ST_SETTLE;
          cnt_nx   = CNT_W'(SETTLE_CYCLES - 1);
        end else begin
          cnt_nx = cnt - 1'b1;
        end
      end
      ST_SETTLE: begin
        if (cnt == '0) state_nx = ST_CAPTURE;
        else           cnt_nx   = cnt - 1'b1;
      end
      ST_CAPTURE: state_nx = ST_IDLE;
      default:    state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      cnt        <= '0;
      rec_preset <= 1'b0;
      done       <= 1'b0;
    end else begin
      state      <= state_nx;
      cnt        <= cnt_nx;
      rec_preset <= (state_nx == ST_CLEAR);
      done       <= (state == ST_CAPTURE);
    end
  end

  always_comb begin
    lfsr_clear = (state == ST_CLEAR);
    lfsr_load  = (state == ST_LOAD);
    lfsr_step  = (state == ST_STEP);
    capture    = (state == ST_CAPTURE);
    busy       = (state != ST_IDLE);
  end

  // The recorders must be free before the operands change.
  assert property (@(posedge clk) disable iff (!rst_n) lfsr_load |-> !rec_preset);
  assert property (@(posedge clk) disable iff (!rst_n) lfsr_step |-> !rec_preset);

endmodule
