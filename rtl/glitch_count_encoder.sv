// glitch_count_encoder: turns a one-hot recorder state into the binary
// glitch count that forms one COUNT_W-bit field of the ID.
//
// count is the index of the set bit (bit k set -> k glitches). valid is 1
// when exactly one bit is set; a recorder upset into a state with no or
// several 1s shows as valid = 0, and count is then the OR of the indices
// of the set bits. Purely combinational.
//
// Reading the ID as the position of the 1, four bits per 16-bit recorder,
// follows the published design; the valid flag is this design's addition
// so that a corrupt recorder is not read as a count.
module glitch_count_encoder #(
  parameter int unsigned DEPTH   = df_pkg::RECORDER_DEPTH,
  parameter int unsigned COUNT_W = $clog2(DEPTH)
) (
  input  logic [DEPTH-1:0]   onehot,
  output logic [COUNT_W-1:0] count,
  output logic               valid
);

  always_comb begin
    count = '0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      if (onehot[k]) count |= COUNT_W'(k);
    end
    // Exactly one bit set: non-zero, and clearing the lowest 1 leaves 0.
    valid = (onehot != '0) && ((onehot & (onehot - 1'b1)) == '0);
  end

endmodule
