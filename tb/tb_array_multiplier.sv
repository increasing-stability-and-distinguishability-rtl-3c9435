// tb_array_multiplier: self-checking testbench of the array multiplier.
//
// A 32 x 32 instance (the default size) is checked on corner operands,
// the structured input words of the fingerprint (all ones, ones with 0s
// shifted in from the MSB, 1 followed by N_zero 0s) and 20000 random
// pairs; a 4 x 4 instance (the size of the textbook array, 8 product
// bits) and an 8 x 8 instance are checked exhaustively. The reference is the
// simulator's own * operator on 64-bit values. The watchdog fails the run
// if it has not ended after 10 ms of simulated time.
module tb_array_multiplier;
  import df_pkg::*;

  logic [31:0] a, b;
  logic [63:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  array_multiplier dut (.a(a), .b(b), .p(p));
  array_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  array_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic check32(logic [31:0] x, logic [31:0] y);
    logic [63:0] exp;
    a = x; b = y;
    #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(0, 0);
    check32('1, '1);
    check32('1, 1);
    check32(1, '1);
    check32(32'h8000_0000, 32'h8000_0000);
    for (int s = 0; s <= 32; s++) check32(32'hFFFF_FFFF >> s, 32'hFFFF_FFFF >> s);
    for (int z = 0; z <= 14; z++)
      for (int sb = 0; sb <= 4; sb += 4)
        check32(32'(pattern_word(32, sb, z)), 32'(pattern_word(32, sb, z)));
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom);
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d * %0d = %0d", x, y, p8);
        end
      end
    end
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL 4-bit %0d * %0d = %0d", x, y, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
