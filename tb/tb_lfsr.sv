// tb_lfsr: self-checking testbench of the loadable LFSR.
//
// Checks, against a reference written from the polynomial
// x^16 + x^14 + x^13 + x^11 + 1: reset to 0, load of a seed, single steps,
// hold when idle, the clear > load > step priority, and that the register
// returns to its seed after exactly 65535 steps (maximal length) and not
// before. A watchdog ends the run as a failure after 200000 cycles.
module tb_lfsr;
  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        clear = 1'b0, load = 1'b0, step = 1'b0;
  logic [15:0] seed = '0;
  logic [15:0] q;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .clear, .load, .seed, .step, .q);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(logic [15:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    int period;
    #1 rst_n = 1'b0;
    #1 check(16'h0000, "reset");
    @(negedge clk) rst_n = 1'b1;
    // load
    seed = 16'hACE1; load = 1'b1;
    @(negedge clk) load = 1'b0;
    check(16'hACE1, "load");
    model = 16'hACE1;
    // hold
    @(negedge clk) check(model, "hold");
    // single steps
    for (int i = 0; i < 100; i++) begin
      step = 1'b1;
      @(negedge clk);
      model = ref_next(model);
      check(model, "step");
    end
    // load wins over step
    seed = 16'h1234; load = 1'b1; step = 1'b1;
    @(negedge clk) check(16'h1234, "load over step");
    // clear wins over load
    clear = 1'b1;
    @(negedge clk) check(16'h0000, "clear over load");
    clear = 1'b0; step = 1'b0;
    @(negedge clk) check(16'h1234, "reload");
    load = 1'b0;
    // maximal length
    step = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (q != 16'h1234 && period < 70000);
    step = 1'b0;
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d, expected 65535", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
