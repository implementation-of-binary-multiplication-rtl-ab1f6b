// systolic_cell: one processing element of the systolic array multiplier.
//
// The cell forms the partial product a_bit AND b_bit and adds it, in a full
// adder, to the sum arriving from the cell above-left (sum_in) and the carry
// arriving from the cell above in the same column (carry_in). It passes its
// sum down and its carry on. A cell that multiplies bits and adds them into
// a column with the carries is what the source describes; the full-adder
// form of the cell is this design's choice. With b_bit tied to 1 the cell is
// a plain full adder, which is how the array's final row uses it.
//
// Interface: four 1-bit inputs, two 1-bit outputs, no clock.
module systolic_cell (
  input  logic a_bit,
  input  logic b_bit,
  input  logic sum_in,
  input  logic carry_in,
  output logic sum_out,
  output logic carry_out
);

  logic pp;

  always_comb begin
    pp        = a_bit & b_bit;
    sum_out   = pp ^ sum_in ^ carry_in;
    carry_out = (pp & sum_in) | (pp & carry_in) | (sum_in & carry_in);
  end

endmodule
