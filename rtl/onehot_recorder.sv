// onehot_recorder: one-hot shift register that counts the glitches of one
// multiplier product line.
//
// The product line is wired to the register's clock. The register starts
// one-hot (bit 0 set, all others clear); every rising edge on the line that
// is long enough to meet the flip-flops' timing moves the 1 up by one
// place, so the position of the 1 is the number of recorded glitches.
// Edges too short to meet the timing are lost, which is what makes some
// lines unstable from poll to poll.
//
// Interface: glitch (the product line, used as clock), preset (active-high,
// asynchronous: forces the one-hot start state and holds it while high),
// state (DEPTH bits, one-hot). With DEPTH = 16 a line records 0..15
// glitches; the 1 wraps from bit DEPTH-1 back to bit 0, so the count is
// modulo DEPTH.
//
// The one-hot start, the 16 bits and clocking from the product line follow
// the published design. The asynchronous preset and the wrap-around after
// DEPTH-1 glitches are choices of this design.
module onehot_recorder #(
  parameter int unsigned DEPTH = df_pkg::RECORDER_DEPTH
) (
  input  logic             glitch,
  input  logic             preset,
  output logic [DEPTH-1:0] state
);

  always_ff @(posedge glitch or posedge preset) begin
    if (preset) state <= DEPTH'(1);
    else        state <= {state[DEPTH-2:0], state[DEPTH-1]};
  end

endmodule
