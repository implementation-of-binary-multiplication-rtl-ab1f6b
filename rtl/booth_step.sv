// booth_step: one iteration of radix-2 Booth multiplication, as combinational
// logic.
//
// The working state is register U (the upper, accumulating half, N+1 bits),
// register V (the multiplier, shifted out to the right one bit per step) and
// q_prev, the multiplier bit shifted out last. The step looks at the last two
// bits {V[0], q_prev}:
//   00 or 11 : no arithmetic,
//   01       : U := U + multiplicand,
//   10       : U := U - multiplicand,
// and then shifts U:V:q_prev right by one place, copying U's sign bit. This
// is the rule the source algorithm gives. U is one bit wider than the
// operands (this design's choice) so that adding or subtracting the most
// negative N-bit multiplicand can never overflow.
//
// Interface: u_in/v_in/q_prev_in and the multiplicand in, the next state and
// the operation performed (op) out. No clock: N of these in a chain form the
// unrolled multiplier.
module booth_step
  import mult_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N:0]   u_in,
  input  logic [N-1:0] v_in,
  input  logic         q_prev_in,
  input  logic [N-1:0] multiplicand,
  output logic [N:0]   u_out,
  output logic [N-1:0] v_out,
  output logic         q_prev_out,
  output booth_op_e    op
);

  logic [N:0] mcand_ext;
  logic [N:0] sum;

  always_comb begin
    mcand_ext = {multiplicand[N-1], multiplicand};
    op        = booth_decode(v_in[0], q_prev_in);
    unique case (op)
      BOOTH_ADD: sum = u_in + mcand_ext;
      BOOTH_SUB: sum = u_in - mcand_ext;
      default:   sum = u_in;
    endcase
    // Arithmetic right shift of U:V:q_prev.
    u_out      = {sum[N], sum[N:1]};
    v_out      = N'({sum[0], v_in} >> 1);
    q_prev_out = v_in[0];
  end

endmodule
