// full_adder: one-bit full adder, the cell of the array multiplier.
//
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational. Each
// cell of the multiplier array is one instance, so the array keeps the
// cell-by-cell structure whose uneven path delays make the glitches the
// fingerprint records.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
