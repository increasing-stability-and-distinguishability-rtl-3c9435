// tb_glitch_chips: the fingerprint with a glitching multiplier, across
// simulated chips.
//
// The design's own poll_ctrl, lfsr, onehot_recorder and
// glitch_count_encoder blocks are wired as in df_top. The zero-delay
// array_multiplier is replaced by glitch_array_multiplier, whose cell
// delays depend on a `chip` number, so each chip's product lines glitch
// in their own way. For each of CHIPS chips the testbench polls the
// improved word (four sign bits high, N_zero = 5: F0410410) twice and the
// baseline word (N_zero = 2: 92492492) once, both words on both operands.
//
// Checks:
//   - every recorder's count equals, modulo 16, the number of rising edges
//     an independent monitor saw on its line while the recorder was free
//   - the settled product equals a * b
//   - the same chip gives the same ID on both polls of the same word
//   - glitching happens: some line records more than one edge
//   - the improved-word IDs of all chips are different from each other
// It also prints, per word, the average number of edges and of short
// pulses (high for less than 20 ps) per chip. On the first SWEEP_CHIPS
// chips it repeats the two input-word experiments of the fingerprint
// study: the sign-bit scan (FFFFFFFF with 0s shifted in from the MSB) and
// the N_zero sweep (N_zero = 0..6 and 14), printing the average largest
// glitch count of a line and the average number of short pulses. These
// figures are reported, not checked, beyond the per-poll checks above. The cell delays are invented, so these figures illustrate the
// mechanism only. A watchdog fails the run after 200 us.
module tb_glitch_chips;
  import df_pkg::*;

  localparam int CHIPS    = 60;
  localparam int SHORT_PS = 20;
  localparam int SWEEP_CHIPS = 4;

  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [15:0] steps = '0;
  logic [31:0] seed_a = '0, seed_b = '0;
  int          chip = 0;
  logic        lfsr_clear, lfsr_load, lfsr_step, rec_preset, capture, busy, done;
  logic [63:0] operands, product;
  logic [63:0][3:0] count;
  logic [63:0] count_ok;

  int checks = 0, failures = 0;

  always #5ns clk = ~clk;

  poll_ctrl u_ctrl (.clk, .rst_n, .start, .steps, .lfsr_clear, .lfsr_load, .lfsr_step,
                    .rec_preset, .capture, .busy, .done);

  for (genvar g = 0; g < 4; g++) begin : g_lfsr
    lfsr u_lfsr (.clk, .rst_n, .clear(lfsr_clear), .load(lfsr_load),
                 .seed(g < 2 ? seed_a[g*16 +: 16] : seed_b[(g-2)*16 +: 16]),
                 .step(lfsr_step), .q(operands[g*16 +: 16]));
  end

  glitch_array_multiplier u_mult (.chip(chip), .a(operands[31:0]), .b(operands[63:32]), .p(product));

  // Recorders plus an independent edge monitor on every line.
  int  edges[64];
  int  shorts[64];
  for (genvar k = 0; k < 64; k++) begin : g_line
    logic [15:0] st;
    realtime     t_rise;
    onehot_recorder u_rec (.glitch(product[k]), .preset(rec_preset), .state(st));
    glitch_count_encoder u_enc (.onehot(st), .count(count[k]), .valid(count_ok[k]));
    always @(posedge product[k]) begin
      t_rise = $realtime;
      if (!rec_preset) edges[k]++;
    end
    always @(negedge product[k]) begin
      if (!rec_preset && ($realtime - t_rise) < SHORT_PS * 1ps) shorts[k]++;
    end
  end

  task automatic poll(input logic [31:0] w, output logic [63:0][3:0] id,
                      output int n_edges, output int n_shorts, output int max_edges);
    seed_a = w; seed_b = w;
    foreach (edges[k]) begin edges[k] = 0; shorts[k] = 0; end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!capture) @(negedge clk);
    id = count;
    n_edges = 0; n_shorts = 0; max_edges = 0;
    for (int k = 0; k < 64; k++) begin
      n_edges  += edges[k];
      n_shorts += shorts[k];
      if (edges[k] > max_edges) max_edges = edges[k];
      checks++;
      if (count[k] !== 4'(edges[k]) || !count_ok[k]) begin
        failures++;
        if (failures < 10) $display("FAIL chip %0d line %0d: count %0d, edges %0d", chip, k, count[k], edges[k]);
      end
    end
    checks++;
    if (product !== 64'(w) * 64'(w)) begin
      failures++;
      $display("FAIL chip %0d: product %h", chip, product);
    end
    @(negedge clk);
  endtask

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w_impr, w_base;
    logic [63:0][3:0] id1, id2, idb;
    logic [63:0][3:0] ids[CHIPS];
    int e, s, mx, e_impr, s_impr, e_base, s_base, glitchy, distinct;

    w_impr = 32'(pattern_word(OPERAND_W, SIGN_BITS, IMPROVED_NZERO));
    w_base = 32'(pattern_word(OPERAND_W, 0, 2));
    e_impr = 0; s_impr = 0; e_base = 0; s_base = 0; glitchy = 0;

    #1ns rst_n = 1'b0;
    #20ns rst_n = 1'b1;

    for (int c = 0; c < CHIPS; c++) begin
      chip = c;
      poll(w_impr, id1, e, s, mx);
      e_impr += e; s_impr += s;
      if (mx > 1) glitchy++;
      poll(w_impr, id2, e, s, mx);
      checks++;
      if (id1 !== id2) begin
        failures++;
        $display("FAIL chip %0d: ID changed between two polls", c);
      end
      poll(w_base, idb, e, s, mx);
      e_base += e; s_base += s;
      ids[c] = id1;
    end

    checks++;
    if (glitchy == 0) begin
      failures++;
      $display("FAIL no line ever glitched");
    end

    distinct = 0;
    for (int c = 0; c < CHIPS; c++) begin
      bit seen = 1'b0;
      for (int d = 0; d < c; d++) if (ids[d] == ids[c]) seen = 1'b1;
      if (!seen) distinct++;
    end
    checks++;
    if (distinct != CHIPS) begin
      failures++;
      $display("FAIL only %0d distinct IDs among %0d chips", distinct, CHIPS);
    end

    $display("improved word %h: %0d rising edges and %0d short pulses per chip on average",
             w_impr, e_impr / CHIPS, s_impr / CHIPS);
    $display("baseline word %h: %0d rising edges and %0d short pulses per chip on average",
             w_base, e_base / CHIPS, s_base / CHIPS);
    $display("%0d distinct IDs among %0d chips", distinct, CHIPS);

    // Input-word experiments on a few chips.
    for (int sh = 0; sh <= 32; sh++) begin
      int sum_mx;
      sum_mx = 0;
      w_base = 32'hFFFF_FFFF >> sh;
      for (int c = 0; c < SWEEP_CHIPS; c++) begin
        chip = c;
        poll(w_base, idb, e, s, mx);
        sum_mx += mx;
      end
      $display("sign-bit scan: %2d zeros from the MSB, word %h, average max glitch count %0.2f",
               sh, w_base, real'(sum_mx) / SWEEP_CHIPS);
    end
    for (int z = 0; z <= 14; z++) begin
      int sum_mx, sum_s;
      if (z > 6 && z != 14) continue;
      sum_mx = 0;
      sum_s  = 0;
      w_base = 32'(pattern_word(OPERAND_W, 0, z));
      for (int c = 0; c < SWEEP_CHIPS; c++) begin
        chip = c;
        poll(w_base, idb, e, s, mx);
        sum_mx += mx;
        sum_s  += s;
      end
      $display("N_zero sweep: N_zero %2d, word %h, average max glitch count %0.2f, short pulses %0.2f",
               z, w_base, real'(sum_mx) / SWEEP_CHIPS, real'(sum_s) / SWEEP_CHIPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
