// glitch_array_multiplier: behavioural copy of array_multiplier whose
// cells have per-chip delays, so that its product lines glitch. Simulation
// only; it stands in for the synthesizable array in glitch testbenches.
//
// The cell array, the partial products and the way sums and carries pass
// from row to row are exactly those of array_multiplier; only the
// full_adder cells are replaced by glitch_full_adder. The `chip` input
// picks the set of delays. After the last change has propagated (a few
// ns for N = 32), p equals a * b.
module glitch_array_multiplier #(
  parameter int unsigned N = 32
) (
  input  int             chip,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic pp, acc, cin, s, co;

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

      glitch_full_adder u_fa (
        .chip(chip),
        .row (j),
        .col (i),
        .a   (pp),
        .b   (acc),
        .cin (cin),
        .s   (s),
        .cout(co)
      );
    end

    if (j < N - 1) begin : g_low
      assign p[j] = g_row[j].g_col[0].s;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_high
    assign p[N-1+i] = g_row[N-1].g_col[i].s;
  end
  assign p[2*N-1] = g_row[N-1].g_col[N-1].co;

endmodule
