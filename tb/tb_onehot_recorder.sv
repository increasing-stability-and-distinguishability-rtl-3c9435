// tb_onehot_recorder: self-checking testbench of the one-hot glitch recorder.
//
// Pulses of varying width and spacing are driven on the glitch input; after
// each one the state must be one-hot with the 1 at (pulses mod 16). Preset
// must restore the start state at once, without a clock, and hold it while
// pulses keep arriving. A watchdog fails the run after 1 ms.
module tb_onehot_recorder;
  logic        glitch = 1'b0;
  logic        preset = 1'b0;
  logic [15:0] state;
  int checks = 0, failures = 0;

  onehot_recorder dut (.glitch, .preset, .state);

  task automatic check(int n, string what);
    checks++;
    if (state !== 16'(1) << (n % 16)) begin
      failures++;
      $display("FAIL %s after %0d pulses: state=%b", what, n, state);
    end
  endtask

  task automatic pulse(int width);
    glitch = 1'b1;
    #(width);
    glitch = 1'b0;
    #(1 + $urandom_range(0, 3));
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 preset = 1'b1;
    #1 check(0, "preset");
    pulse(2);
    check(0, "pulse under preset");
    preset = 1'b0;
    #2 check(0, "release");
    for (int n = 1; n <= 40; n++) begin
      pulse(1 + $urandom_range(0, 4));
      check(n, "count");
    end
    // preset in the middle of a count, without a glitch edge
    #3 preset = 1'b1;
    #1 check(0, "async preset");
    preset = 1'b0;
    #2;
    for (int n = 1; n <= 5; n++) begin
      pulse(1);
      check(n, "recount");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
