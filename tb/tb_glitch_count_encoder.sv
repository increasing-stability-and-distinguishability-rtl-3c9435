// tb_glitch_count_encoder: self-checking testbench of the one-hot to count
// encoder. Every one-hot input must give its bit index and valid = 1; zero
// and 2000 random inputs with two or more bits set must give valid = 0.
// The watchdog fails the run after 1 ms.
module tb_glitch_count_encoder;
  logic [15:0] onehot;
  logic [3:0]  count;
  logic        valid;
  int checks = 0, failures = 0;

  glitch_count_encoder dut (.onehot, .count, .valid);

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      onehot = 16'(1) << k;
      #1;
      checks++;
      if (count !== 4'(k) || valid !== 1'b1) begin
        failures++;
        $display("FAIL bit %0d: count=%0d valid=%b", k, count, valid);
      end
    end
    onehot = '0;
    #1;
    checks++;
    if (valid !== 1'b0) begin
      failures++;
      $display("FAIL zero input reported valid");
    end
    for (int i = 0; i < 2000; i++) begin
      int i1, i2;
      i1 = $urandom_range(0, 15);
      do i2 = $urandom_range(0, 15); while (i2 == i1);
      onehot = (16'(1) << i1) | (16'(1) << i2) | 16'($urandom);
      #1;
      checks++;
      if (valid !== 1'b0) begin
        failures++;
        $display("FAIL multi-hot %b reported valid", onehot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
