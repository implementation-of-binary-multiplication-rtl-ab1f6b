// nbit_multiplier: N-bit binary multiplier for signed and unsigned operands.
//
// Two multipliers work side by side on the same inputs. The Booth multiplier
// treats a and b as two's complement numbers; the systolic array multiplier
// treats them as unsigned. The `sign` input picks which product appears on
// m: 1 for signed, 0 for unsigned. The output is twice as wide as the
// operands, so no product overflows. Pairing Booth for signed and a systolic
// array for unsigned operands, the port names a, b, sign and m, and the 2N-bit
// output follow the source design; computing both products all the time and
// selecting with a multiplexer is this design's choice.
//
// Interface: a, b, sign in; m out. Purely combinational: m is valid one
// propagation delay after the inputs change. The default N = 8 is the width
// of the source's 8-bit results; it was also shown at N = 3.
module nbit_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           sign,
  output logic [2*N-1:0] m
);

  localparam int CW = $clog2(N + 1);

  logic [2*N-1:0] p_signed;
  logic [2*N-1:0] p_unsigned;
  // Booth status, kept for observation in simulation.
  logic           booth_swapped;
  logic [CW-1:0]  booth_adds;
  logic [CW-1:0]  booth_subs;

  booth_multiplier #(.N(N)) u_booth (
    .a         (a),
    .b         (b),
    .p         (p_signed),
    .swapped   (booth_swapped),
    .add_count (booth_adds),
    .sub_count (booth_subs)
  );

  systolic_multiplier #(.N(N)) u_systolic (
    .a (a),
    .b (b),
    .p (p_unsigned)
  );

  assign m = sign ? p_signed : p_unsigned;

endmodule
