// tb_poll_ctrl: self-checking testbench of the poll sequencer.
//
// Runs polls with steps = 0, 1, 7 and 300 at the default CLEAR_CYCLES = 2
// and SETTLE_CYCLES = 4 and checks for each: the start-to-capture time of
// CLEAR_CYCLES + steps + SETTLE_CYCLES + 3 clocks, exactly one load,
// exactly `steps` step strobes, lfsr_clear high for CLEAR_CYCLES clocks
// with rec_preset high, rec_preset low at load, during steps and after the
// poll, one done pulse right after capture, busy over the whole poll, and
// that a start while busy is ignored. The watchdog fails the run after
// 5000 clocks.
module tb_poll_ctrl;
  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [15:0] steps = '0;
  logic        lfsr_clear, lfsr_load, lfsr_step, rec_preset, capture, busy, done;
  int checks = 0, failures = 0;

  poll_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run_poll(int s);
    int cyc, n_load, n_step, n_clear, n_done, cap_at, bad_preset, clear_unpreset, not_busy;
    steps = 16'(s);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1; n_load = 0; n_step = 0; n_clear = 0; n_done = 0; cap_at = -1;
    bad_preset = 0; clear_unpreset = 0; not_busy = 0;
    while (cap_at < 0 && cyc < 1000) begin
      if (lfsr_load) n_load++;
      if (lfsr_step) n_step++;
      if (lfsr_clear) n_clear++;
      if (lfsr_clear && !rec_preset) clear_unpreset++;
      if ((lfsr_load || lfsr_step) && rec_preset) bad_preset++;
      if (!busy) not_busy++;
      if (capture) cap_at = cyc;
      if (cyc == 3) start = 1'b1;  // ignored: the poll is running
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    expect_eq(done, 1, "done after capture");
    expect_eq(busy, 0, "idle after capture");
    @(negedge clk);
    expect_eq(done, 0, "done is one pulse");
    expect_eq(busy, 0, "restart ignored");
    expect_eq(rec_preset, 0, "recorders hold counts after poll");
    expect_eq(cap_at, 2 + s + 4 + 3, $sformatf("capture cycle, steps=%0d", s));
    expect_eq(n_load, 1, "loads");
    expect_eq(n_step, s, "steps");
    expect_eq(n_clear, 2, "clear cycles");
    expect_eq(clear_unpreset, 0, "preset during clear");
    expect_eq(bad_preset, 0, "preset released before operand change");
    expect_eq(not_busy, 0, "busy during poll");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 expect_eq(rec_preset, 0, "preset low in reset");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq(rec_preset, 0, "preset low before first poll");
    expect_eq(busy, 0, "idle after reset");
    run_poll(0);
    run_poll(1);
    run_poll(7);
    run_poll(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
