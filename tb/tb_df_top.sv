// tb_df_top: end-to-end testbench of the digital fingerprint circuit at its
// default size (32 x 32 multiplier, 64 recorders of 16 bits, 256-bit ID).
//
// The testbench plays the host: it writes the two input words, picks the
// number of LFSR steps, starts a poll and reads the ID. For every poll it
// predicts the ID on its own: it steps its own model of the four 16-bit
// LFSRs (x^16 + x^14 + x^13 + x^11 + 1), multiplies the operands with the
// * operator, and counts, per product bit, the 0 -> 1 transitions from the
// cleared product (0) through the loaded word and every step, modulo 16.
// In a zero-delay simulation that is exactly what each recorder sees.
//
// Polls run:
//   - random words with 0, 1, 5 and 40 steps (100 steps makes lines wrap)
//   - the sign-bit scan: both words start at FFFFFFFF and 0s are shifted
//     in from the MSB, one poll per shift (33 polls)
//   - the N_zero sweep: words 1 followed by N_zero 0s, repeated, for
//     N_zero = 0..6 and 14, with and without the four sign bits high
//   - a stability run: 1000 polls of the improved word (four sign bits,
//     N_zero = 5) with 3 steps; each line's summed count must equal 1000
//     times its single-poll count, and lines that deviate by more than 1%
//     are counted as unstable (none may be)
// Each poll also checks the poll latency (CLEAR_CYCLES + steps +
// SETTLE_CYCLES + 3 clocks from start to ID update) and that every recorder
// was one-hot. Mechanisms that must each occur at least once: single-word
// poll, stepped poll, recorder wrap-around, a poll that starts from a
// non-zero previous ID (recorders re-preset), a poll with a sign-bit word,
// a poll with an N_zero >= 5 word. A watchdog fails the run after 400000
// clocks.
module tb_df_top;
  import df_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [31:0]      seed_a = '0, seed_b = '0;
  logic [15:0]      steps = '0;
  logic             busy, done;
  logic [63:0][3:0] id;
  logic [63:0]      id_ok;

  df_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_single = 0, n_stepped = 0, n_wrap = 0, n_represet = 0, n_sign = 0, n_nzero5 = 0;
  logic prev_id_nonzero = 1'b0;

  // Reference model.
  function automatic logic [15:0] ref_step(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic ref_id(input logic [31:0] wa, input logic [31:0] wb, input int s,
                        output logic [63:0][3:0] exp, output int wrapped);
    logic [15:0] r[4];
    logic [63:0] prod, prev;
    int rises[64];
    r[0] = wa[15:0]; r[1] = wa[31:16]; r[2] = wb[15:0]; r[3] = wb[31:16];
    prev = '0;
    foreach (rises[k]) rises[k] = 0;
    for (int t = 0; t <= s; t++) begin
      if (t > 0) for (int g = 0; g < 4; g++) r[g] = ref_step(r[g]);
      prod = 64'({r[1], r[0]}) * 64'({r[3], r[2]});
      for (int k = 0; k < 64; k++) if (!prev[k] && prod[k]) rises[k]++;
      prev = prod;
    end
    wrapped = 0;
    for (int k = 0; k < 64; k++) begin
      exp[k] = 4'(rises[k]);
      if (rises[k] >= 16) wrapped++;
    end
  endtask

  // One poll through the host interface; returns the ID read.
  task automatic poll(input logic [31:0] wa, input logic [31:0] wb, input int s,
                      output logic [63:0][3:0] got);
    logic [63:0][3:0] exp;
    int wrapped, cyc;
    ref_id(wa, wb, s, exp, wrapped);
    seed_a = wa; seed_b = wb; steps = 16'(s);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    // done rises one clock after the capture edge
    checks++;
    if (cyc - 1 != 2 + s + 4 + 3) begin
      failures++;
      $display("FAIL latency %0d clocks for %0d steps", cyc - 1, s);
    end
    got = id;
    checks++;
    if (id !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL id a=%h b=%h steps=%0d\n  got %h\n  exp %h", wa, wb, s, id, exp);
    end
    checks++;
    if (id_ok !== '1) begin
      failures++;
      $display("FAIL recorder not one-hot: %b", id_ok);
    end
    if (s == 0) n_single++; else n_stepped++;
    if (wrapped > 0) n_wrap++;
    if (prev_id_nonzero) n_represet++;
    prev_id_nonzero = (id != '0);
  endtask

  function automatic int max_count(logic [63:0][3:0] v);
    int m = 0;
    for (int k = 0; k < 64; k++) if (int'(v[k]) > m) m = int'(v[k]);
    return m;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0][3:0] got, first;
    logic [31:0] w;
    int sum[64];
    int unstable;

    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Random words, single and stepped.
    foreach (got[k]) got[k] = '0;
    for (int i = 0; i < 20; i++) poll($urandom, $urandom, 0, got);
    for (int i = 0; i < 20; i++) poll($urandom, $urandom, 1, got);
    for (int i = 0; i < 20; i++) poll($urandom, $urandom, 5, got);
    for (int i = 0; i < 10; i++) poll($urandom, $urandom, 100, got);

    // Sign-bit scan: 0s shifted in from the MSB of FFFFFFFF.
    for (int sh = 0; sh <= 32; sh++) begin
      w = 32'hFFFF_FFFF >> sh;
      poll(w, w, 4, got);
      if (sh < int'(SIGN_BITS) && sh < 32) n_sign++;
      $display("sign scan: %0d zeros shifted in, word %h, max count %0d", sh, w, max_count(got));
    end

    // N_zero sweep.
    for (int sb = 0; sb <= int'(SIGN_BITS); sb += int'(SIGN_BITS)) begin
      for (int z = 0; z <= 14; z++) begin
        if (z > 6 && z != 14) continue;
        w = 32'(pattern_word(OPERAND_W, sb, z));
        checks++;
        if (z > 0 && min_nzero(64'(w), OPERAND_W, sb) != z) begin
          failures++;
          $display("FAIL pattern word %h has N_zero %0d, wanted %0d", w, min_nzero(64'(w), OPERAND_W, sb), z);
        end
        poll(w, w, 4, got);
        if (sb > 0) n_sign++;
        if (z >= 5) n_nzero5++;
        $display("N_zero sweep: sign bits %0d, N_zero %0d, word %h, max count %0d", sb, z, w, max_count(got));
      end
    end

    // Stability run on the improved word.
    w = 32'(pattern_word(OPERAND_W, SIGN_BITS, IMPROVED_NZERO));
    foreach (sum[k]) sum[k] = 0;
    poll(w, w, 3, first);
    for (int i = 0; i < 1000; i++) begin
      poll(w, w, 3, got);
      for (int k = 0; k < 64; k++) sum[k] += int'(got[k]);
    end
    n_nzero5++;
    unstable = 0;
    for (int k = 0; k < 64; k++) begin
      int ideal, dev;
      ideal = 1000 * int'(first[k]);
      dev   = sum[k] > ideal ? sum[k] - ideal : ideal - sum[k];
      if (dev * 100 > 1000) unstable++;  // differs in more than 1% of 1000 polls
    end
    $display("stability: word %h, %0d unstable lines of 64", w, unstable);
    checks++;
    if (unstable != 0) failures++;

    $display("mechanisms: single=%0d stepped=%0d wrap=%0d represet=%0d sign_words=%0d nzero5_words=%0d",
             n_single, n_stepped, n_wrap, n_represet, n_sign, n_nzero5);
    checks += 6;
    if (n_single == 0)   begin failures++; $display("FAIL no single-word poll"); end
    if (n_stepped == 0)  begin failures++; $display("FAIL no stepped poll"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no recorder wrapped"); end
    if (n_represet == 0) begin failures++; $display("FAIL no re-preset"); end
    if (n_sign == 0)     begin failures++; $display("FAIL no sign-bit word"); end
    if (n_nzero5 == 0)   begin failures++; $display("FAIL no N_zero>=5 word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
