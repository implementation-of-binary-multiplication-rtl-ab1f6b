// systolic_multiplier: unsigned N x N bit array multiplier made of a grid of
// systolic cells.
//
// Row j of the grid handles multiplier bit b[j] and column i multiplicand bit
// a[i], so cell (i,j) forms the partial product a[i]&b[j] of weight i+j. Data
// moves in two directions: each cell's sum goes down-left to the cell of the
// same weight in the next row, and its carry goes straight down to the cell
// one weight higher. Column 0 of row j is final and gives product bit j. The
// sums and carries leaving the last row are added by a ripple row of N more
// cells (used as full adders) to give product bits N..2N-1. The carry out of
// that last ripple cell is always 0, since an N x N product fits in 2N bits,
// and is left unconnected.
//
// Multiplying every bit pair and adding each column with its carries is the
// source algorithm; the carry-save grid with a ripple row, and building it
// without pipeline registers (the source measures the multiplier as one
// pad-to-pad combinational path), are this design's reading.
//
// Interface: a, b (unsigned) in; p (2N bits, unsigned) out; no clock.
module systolic_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // s[j][i], c[j][i]: sum and carry leaving cell (i,j).
  logic [N-1:0] s [N];
  logic [N-1:0] c [N];
  // Ripple carries of the final row.
  logic [N:0]   r;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sum_in;
      logic carry_in;
      if (j == 0) begin : g_first
        assign sum_in   = 1'b0;
        assign carry_in = 1'b0;
      end else begin : g_next
        if (i < N - 1) begin : g_inner
          assign sum_in = s[j-1][i+1];
        end else begin : g_edge
          assign sum_in = 1'b0;
        end
        assign carry_in = c[j-1][i];
      end
      systolic_cell u_cell (
        .a_bit     (a[i]),
        .b_bit     (b[j]),
        .sum_in    (sum_in),
        .carry_in  (carry_in),
        .sum_out   (s[j][i]),
        .carry_out (c[j][i])
      );
    end
    assign p[j] = s[j][0];
  end

  // Final ripple row: product bits N .. 2N-1.
  assign r[0] = 1'b0;
  for (genvar k = 0; k < N; k++) begin : g_final
    logic upper_sum;
    if (k < N - 1) begin : g_inner
      assign upper_sum = s[N-1][k+1];
    end else begin : g_edge
      assign upper_sum = 1'b0;
    end
    systolic_cell u_add (
      .a_bit     (upper_sum),
      .b_bit     (1'b1),
      .sum_in    (c[N-1][k]),
      .carry_in  (r[k]),
      .sum_out   (p[N+k]),
      .carry_out (r[k+1])
    );
  end

endmodule
