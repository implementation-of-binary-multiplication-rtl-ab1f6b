// booth_multiplier: signed (two's complement) N x N bit multiplier using
// radix-2 Booth's algorithm, fully unrolled into combinational logic.
//
// First booth_operand_select makes the operand with fewer bit changes the
// multiplier, which keeps the number of add/subtract steps down. Then a chain
// of N booth_step stages runs the algorithm: U starts at 0, V holds the
// multiplier and the bit right of it starts at 0; each stage adds, subtracts
// or skips the multiplicand according to the last two bits and shifts U:V
// right. After N stages the low N bits of U followed by V are the 2N-bit
// product. The operand choice, the Booth rule and the N iterations follow
// the source algorithm; unrolling the N iterations into a chain with no
// clock, matching an implementation measured as one pad-to-pad path, is this
// design's reading.
//
// Interface: a, b (two's complement) in; p (2N-bit two's complement product)
// out, valid after the combinational delay. swapped, add_count and sub_count
// report the operand choice and how many add and subtract steps were done.
module booth_multiplier
  import mult_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  output logic [2*N-1:0]         p,
  output logic                   swapped,
  output logic [$clog2(N+1)-1:0] add_count,
  output logic [$clog2(N+1)-1:0] sub_count
);

  localparam int CW = $clog2(N + 1);

  logic [N-1:0] multiplicand;
  logic [N-1:0] multiplier;
  logic [CW-1:0] changes_a;
  logic [CW-1:0] changes_b;

  booth_operand_select #(.N(N)) u_select (
    .a            (a),
    .b            (b),
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .swapped      (swapped),
    .changes_a    (changes_a),
    .changes_b    (changes_b)
  );

  // State between iterations: index k is the state before iteration k.
  logic [N:0]   u     [N+1];
  logic [N-1:0] v     [N+1];
  logic         q_prev[N+1];
  booth_op_e    op    [N];

  assign u[0]      = '0;
  assign v[0]      = multiplier;
  assign q_prev[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_step
    booth_step #(.N(N)) u_step (
      .u_in         (u[k]),
      .v_in         (v[k]),
      .q_prev_in    (q_prev[k]),
      .multiplicand (multiplicand),
      .u_out        (u[k+1]),
      .v_out        (v[k+1]),
      .q_prev_out   (q_prev[k+1]),
      .op           (op[k])
    );
  end

  assign p = {u[N][N-1:0], v[N]};

  always_comb begin
    add_count = '0;
    sub_count = '0;
    for (int k = 0; k < N; k++) begin
      if (op[k] == BOOTH_ADD) add_count = add_count + 1'b1;
      if (op[k] == BOOTH_SUB) sub_count = sub_count + 1'b1;
    end
  end

endmodule
