// lfsr: loadable linear feedback shift register of the input stage.
//
// The fingerprint's input stage is a bank of LFSRs whose bits drive the
// multiplier operands. They are registers, so every operand bit changes on
// the same clock edge and no race between input bits adds glitches of its
// own. The embedded host writes the start value (the input word) through
// `seed`; that is how the input word is changed without rebuilding the FPGA.
//
// Function (priority in this order, all synchronous to clk):
//   clear : q <= 0 (operands at rest before a poll)
//   load  : q <= seed
//   step  : q <= {q[WIDTH-2:0], ^(q & TAPS)}   (Fibonacci form, shift left)
// An asynchronous active-low reset also zeroes q. q is valid one cycle
// after the edge that loads or steps it.
//
// Loading from a host and driving all operand bits at once follow the
// published design; the width of one LFSR, the feedback polynomial
// (x^16 + x^14 + x^13 + x^11 + 1, maximal length) and the clear input are
// choices of this design, which the published design leaves open.
module lfsr #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = WIDTH'(16'hB400)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= seed;
    else if (step)  q <= {q[WIDTH-2:0], ^(q & TAPS)};
  end

endmodule
