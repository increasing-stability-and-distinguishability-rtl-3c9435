// df_top: digital fingerprint circuit for FPGA identification.
//
// The ID of a chip is read from the transient glitches of a combinational
// multiplier. Two operand words, held in LFSRs, are changed on one clock
// edge; while the 2N-bit product settles, each product line toggles a
// number of times that depends on the delays of the exact transistors and
// wires it crosses. Every product line clocks its own one-hot recorder, so
// after the operands stop changing each recorder holds the number of
// glitches its line made (modulo DEPTH). The 2N counts, COUNT_W bits each,
// form the ID: 64 x 4 = 256 bits with the default 32-bit operands.
//
// Datapath:
//   seed_a/seed_b -> NUM_LFSR lfsr (LFSR_W bits each; the lower half of the
//   bank forms operand a, the upper half operand b) -> array_multiplier
//   -> product line k clocks onehot_recorder k -> glitch_count_encoder k
//   -> ID register (loaded by poll_ctrl's capture strobe).
//
// Host interface (the embedded processor in the published design):
//   seed_a, seed_b  input words, sampled by the LFSRs during LOAD
//   steps           LFSR shifts after the load (0 = single input word)
//   start / busy / done   poll handshake, done pulses for one clock
//   id[k]           glitch count of product line k, valid after done
//   id_ok[k]        recorder k was one-hot when captured
// A poll takes CLEAR_CYCLES + steps + SETTLE_CYCLES + 3 clocks from start
// to the capture edge; id and id_ok change on that edge.
//
// How the input words are chosen decides how good the ID is: keeping the
// operands' SIGN_BITS MSBs at 1 raises the glitch counts (distinguishability),
// and leaving N_zero >= 5 zero bits between ones (1000001...) gives fewer,
// longer glitches that the recorders catch every time (stability).
// df_pkg::pattern_word builds such words.
//
// In a zero-delay simulation a product line makes at most one rising edge
// per operand change, so a simulated count is the number of 0 -> 1
// transitions of that product bit across the poll. On the FPGA the same
// structure counts the real glitches.
//
// The structure (LFSR input stage, 32 x 32 combinational multiplier, one
// 16-bit one-hot recorder per product line, 4-bit counts, 256-bit ID)
// follows the published design. Splitting the LFSR bank into four 16-bit
// registers, the poll sequencer, the ID register and the id_ok flags are
// this design's choices.
//
// The recorders are clocked by product lines, i.e. by combinational logic:
// that is the measuring principle, not a mistake, and it must be kept when
// this is mapped to an FPGA.
module df_top
  import df_pkg::*;
#(
  parameter int unsigned N             = OPERAND_W,
  parameter int unsigned LFSR_W        = 16,
  parameter int unsigned DEPTH         = RECORDER_DEPTH,
  parameter int unsigned STEP_W        = 16,
  parameter int unsigned CLEAR_CYCLES  = 2,
  parameter int unsigned SETTLE_CYCLES = 4,
  localparam int unsigned CW           = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             seed_a,
  input  logic [N-1:0]             seed_b,
  input  logic [STEP_W-1:0]        steps,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [2*N-1:0][CW-1:0]   id,
  output logic [2*N-1:0]           id_ok
);

  localparam int unsigned NUM_LFSR = 2 * N / LFSR_W;

  if (N % LFSR_W != 0) begin : g_bad_split
    $error("df_top: N must be a multiple of LFSR_W");
  end

  logic lfsr_clear, lfsr_load, lfsr_step, rec_preset, capture;

  poll_ctrl #(
    .STEP_W       (STEP_W),
    .CLEAR_CYCLES (CLEAR_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .steps     (steps),
    .lfsr_clear(lfsr_clear),
    .lfsr_load (lfsr_load),
    .lfsr_step (lfsr_step),
    .rec_preset(rec_preset),
    .capture   (capture),
    .busy      (busy),
    .done      (done)
  );

  // Input stage: all operand bits come from registers clocked together.
  logic [2*N-1:0] seeds;
  logic [2*N-1:0] operands;
  assign seeds = {seed_b, seed_a};

  for (genvar g = 0; g < NUM_LFSR; g++) begin : g_lfsr
    lfsr #(.WIDTH(LFSR_W)) u_lfsr (
      .clk  (clk),
      .rst_n(rst_n),
      .clear(lfsr_clear),
      .load (lfsr_load),
      .seed (seeds[g*LFSR_W +: LFSR_W]),
      .step (lfsr_step),
      .q    (operands[g*LFSR_W +: LFSR_W])
    );
  end

  // Glitch generation.
  logic [2*N-1:0] product;

  array_multiplier #(.N(N)) u_mult (
    .a(operands[N-1:0]),
    .b(operands[2*N-1:N]),
    .p(product)
  );

  // Glitch recording, one recorder per product line.
  logic [2*N-1:0][CW-1:0] count;
  logic [2*N-1:0]         count_ok;

  for (genvar k = 0; k < 2 * N; k++) begin : g_line
    logic [DEPTH-1:0] rec_state;

    onehot_recorder #(.DEPTH(DEPTH)) u_rec (
      .glitch(product[k]),
      .preset(rec_preset),
      .state (rec_state)
    );

    glitch_count_encoder #(.DEPTH(DEPTH), .COUNT_W(CW)) u_enc (
      .onehot(rec_state),
      .count (count[k]),
      .valid (count_ok[k])
    );
  end

  // ID register in the system clock domain; the recorders are quiet by the
  // time capture is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id    <= '0;
      id_ok <= '0;
    end else if (capture) begin
      id    <= count;
      id_ok <= count_ok;
    end
  end

endmodule
