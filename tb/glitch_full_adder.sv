// glitch_full_adder: behavioural full adder with per-chip gate delays, the
// cell of glitch_array_multiplier. Simulation only.
//
// Same function as the full_adder cell (s = a ^ b ^ cin, cout = majority),
// but each output follows its inputs after a transport delay of 5..24 ps.
// The two delays are drawn from a hash of (chip, row, col), so every
// simulated "chip" has its own fixed set of cell delays and the same chip
// always gets the same delays. A transport delay passes every input change
// through, so the outputs glitch as real gates do.
//
// The delay range is invented for illustration; it does not describe any
// real device.
module glitch_full_adder (
  input  int   chip,
  input  int   row,
  input  int   col,
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  function automatic int cell_delay(int c, int salt);
    int unsigned h;
    h = 32'h9E37_79B9 ^ (c * 32'h85EB_CA6B) ^ (row * 32'hC2B2_AE35) ^ (col * 32'h27D4_EB2F) ^ salt;
    h = (h ^ (h >> 15)) * 32'h2C1B_3C6D;
    h = (h ^ (h >> 12)) * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return 5 + int'(h % 20);
  endfunction

  int d_s, d_c;

  initial begin
    s    = 1'b0;
    cout = 1'b0;
  end

  always_comb begin
    d_s = cell_delay(chip, 1);
    d_c = cell_delay(chip, 2);
  end

  always @(a, b, cin) begin
    s    <= #(d_s * 1ps) a ^ b ^ cin;
    cout <= #(d_c * 1ps) (a & b) | (a & cin) | (b & cin);
  end

endmodule
