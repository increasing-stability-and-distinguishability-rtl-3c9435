// df_pkg: shared sizes, types and input-word helpers of the digital
// fingerprint circuit.
//
// The fingerprint multiplies two OPERAND_W-bit words in a combinational
// array multiplier and records, on each of its 2*OPERAND_W product lines,
// how many rising edges (glitches) the line makes while the operands change.
// Each line feeds a RECORDER_DEPTH-bit one-hot shift register, so the count
// of a line is a COUNT_W-bit number and the ID is 2*OPERAND_W*COUNT_W bits
// (256 bits for 32-bit operands). The 32-bit operands, 64 product lines,
// 16-bit recorders, 4-bit counts, 256-bit ID, four sign bits and the
// "1 followed by five 0s" input pattern are the published design's numbers.
//
// The helper functions describe the input words that make a stable and
// well-separated ID: the most significant "sign" bits held at 1, and at
// least N_zero inactive (0) bits between any two active (1) bits below them.
package df_pkg;

  localparam int unsigned OPERAND_W      = 32;  // width of each multiplier operand
  localparam int unsigned PRODUCT_W      = 2 * OPERAND_W;  // product lines = recorders
  localparam int unsigned RECORDER_DEPTH = 16;  // bits in each one-hot recorder
  localparam int unsigned COUNT_W        = $clog2(RECORDER_DEPTH);  // 4-bit count per line
  localparam int unsigned ID_W           = PRODUCT_W * COUNT_W;  // 256-bit ID

  localparam int unsigned SIGN_BITS      = 4;   // operand MSBs found to act as sign bits
  localparam int unsigned IMPROVED_NZERO = 5;   // zeros between consecutive ones (1000001...)

  // Glitch count of one product line.
  typedef logic [COUNT_W-1:0] count_t;

  // Poll sequencer states.
  typedef enum logic [2:0] {
    ST_IDLE,    // ID register holds the last poll
    ST_CLEAR,   // operands forced to 0, recorders held at the one-hot start
    ST_ARM,     // recorders released while the product is still 0
    ST_LOAD,    // input words loaded into the LFSRs on one clock edge
    ST_STEP,    // optional LFSR shifts, one per clock
    ST_SETTLE,  // wait for the product lines to go quiet
    ST_CAPTURE  // copy the recorder counts into the ID register
  } poll_state_t;

  // A word of width w whose nsign MSBs are 1 and, below them, a 1 after
  // every nzero 0s: nsign=0, nzero=5 gives 1000001000001...
  function automatic logic [63:0] pattern_word(int unsigned w, int unsigned nsign,
                                               int unsigned nzero);
    logic [63:0] word;
    int unsigned gap;
    word = '0;
    gap  = 0;  // the last sign bit counts as the previous 1
    for (int i = int'(w) - 1; i >= 0; i--) begin
      if (int'(w) - 1 - i < int'(nsign)) begin
        word[i] = 1'b1;
      end else if (nsign == 0 && i == int'(w) - 1) begin
        word[i] = 1'b1;  // a pattern without sign bits starts with a 1
        gap = 0;
      end else if (gap >= nzero) begin
        word[i] = 1'b1;
        gap = 0;
      end else begin
        gap++;
      end
    end
    return word;
  endfunction

  // Smallest run of 0s between two 1s of a word below its nsign MSBs (the
  // lowest sign bit counts as a 1); returns w when there is no such pair.
  function automatic int unsigned min_nzero(logic [63:0] word, int unsigned w,
                                            int unsigned nsign);
    int unsigned best;
    int last;
    best = w;
    last = (nsign > 0) ? int'(w) - int'(nsign) : -1;
    for (int i = int'(w) - 1 - int'(nsign); i >= 0; i--) begin
      if (word[i]) begin
        if (last >= 0 && int'(last) - i - 1 < int'(best)) best = int'(last) - i - 1;
        last = i;
      end
    end
    return best;
  endfunction

endpackage
