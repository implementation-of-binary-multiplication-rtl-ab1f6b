// booth_operand_select: decides which operand Booth's algorithm uses as the
// multiplier.
//
// Booth's algorithm does an add or a subtract at every change between
// neighbouring multiplier bits, so the operand with fewer bit changes makes
// the cheaper multiplier. This block counts the changes of both operands
// (reading from bit 0 upwards, with an implied 0 right of bit 0) and routes
// the operand with fewer changes to `multiplier` and the other to
// `multiplicand`. Choosing by bit changes follows the source algorithm; the
// tie rule (keep b as the multiplier) and the exact way changes are counted
// are this design's choices. Because signed multiplication commutes, the
// swap never changes the product.
//
// Interface: a, b in; multiplicand, multiplier, swapped (1 when a became the
// multiplier) and the two change counts out. Purely combinational.
module booth_operand_select #(
  parameter int N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0]         multiplicand,
  output logic [N-1:0]         multiplier,
  output logic                 swapped,
  output logic [$clog2(N+1)-1:0] changes_a,
  output logic [$clog2(N+1)-1:0] changes_b
);

  localparam int CW = $clog2(N + 1);

  // Count transitions between bit i and bit i-1, with bit -1 taken as 0.
  function automatic logic [CW-1:0] count_changes(input logic [N-1:0] w);
    logic [CW-1:0] cnt;
    logic          prev;
    cnt  = '0;
    prev = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (w[i] != prev) cnt = cnt + 1'b1;
      prev = w[i];
    end
    return cnt;
  endfunction

  always_comb begin
    changes_a = count_changes(a);
    changes_b = count_changes(b);
    swapped   = (changes_a < changes_b);
    if (swapped) begin
      multiplier   = a;
      multiplicand = b;
    end else begin
      multiplier   = b;
      multiplicand = a;
    end
  end

endmodule
