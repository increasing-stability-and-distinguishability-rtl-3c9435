// array_multiplier: combinational N x N unsigned array multiplier, the
// glitch generator of the fingerprint.
//
// The array has N rows of N-bit ripple-carry adders built from full_adder
// cells. Row j adds the partial product a & {N{b[j]}} to the upper N bits
// of the previous row's (N+1)-bit result; the lowest bit of each row is a
// finished product bit, and the last row's N+1 bits are the top of the
// product. Row 0 adds its partial product to zero. Carries ripple along a
// row from cell i to cell i+1, and each row's carry-out becomes the top
// bit of the sum handed to the next row.
//
// Why this structure matters: when an operand changes, the signal paths
// through the rows have different lengths, so the product lines toggle
// several times before settling. Each rising edge on line p[k] is one
// glitch for the recorder attached to that line. A 0 in b[j] turns row j's
// partial product off, so that row adds no transitions of its own; input
// words with runs of 0s between 1s therefore make fewer but longer
// glitches. In a zero-delay simulation the array only shows the settled
// product.
//
// Interface: a, b (N bits each) in, p (2N bits) out, no clock; p = a * b.
// Timing: combinational, the longest path crosses N rows and the ripple
// chain of the last row.
//
// Rows of ripple-carry adders and 32-bit operands (64 product lines)
// follow the published design; the exact way a row's sum and carry feed
// the next row is this design's choice.
module array_multiplier #(
  parameter int unsigned N = df_pkg::OPERAND_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Each cell keeps its own sum and carry nets, so no signal of the array
  // depends on another bit of itself.
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic pp;   // partial product bit a[i] & b[j]
      logic acc;  // bit i+1 of the previous row's result
      logic cin;  // carry from cell i-1 of this row
      logic s;
      logic co;

      assign pp = a[i] & b[j];

      if (j == 0) begin : g_first_row
        assign acc = 1'b0;
      end else if (i == N - 1) begin : g_top_acc
        assign acc = g_row[j-1].g_col[N-1].co;
      end else begin : g_mid_acc
        assign acc = g_row[j-1].g_col[i+1].s;
      end

      if (i == 0) begin : g_first_col
        assign cin = 1'b0;
      end else begin : g_carry
        assign cin = g_row[j].g_col[i-1].co;
      end

      full_adder u_fa (
        .a   (pp),
        .b   (acc),
        .cin (cin),
        .s   (s),
        .cout(co)
      );
    end

    // Bit 0 of each row's result is final.
    if (j < N - 1) begin : g_low
      assign p[j] = g_row[j].g_col[0].s;
    end
  end

  // The last row supplies the upper N+1 product bits.
  for (genvar i = 0; i < N; i++) begin : g_high
    assign p[N-1+i] = g_row[N-1].g_col[i].s;
  end
  assign p[2*N-1] = g_row[N-1].g_col[N-1].co;

endmodule
