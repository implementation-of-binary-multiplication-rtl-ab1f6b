// tb_booth_step: self-checking test of one Booth iteration at N = 8.
// The reference treats U:V as one signed integer X = U*2^N + V, adds or
// subtracts multiplicand*2^N according to the pair {V[0], q_prev}, and
// divides by two rounding down (an arithmetic shift). Random states plus the
// extreme multiplicands are applied; all four bit pairs must occur. U is
// drawn from the N-bit signed range, the only values it holds in operation.
module tb_booth_step;
  import mult_pkg::*;

  localparam int N = 8;
  logic [N:0]   u_in, u_out;
  logic [N-1:0] v_in, v_out, multiplicand;
  logic         q_prev_in, q_prev_out;
  booth_op_e    op;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  booth_step #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint x, mc, x_next;
      logic [N:0]   exp_u;
      logic [N-1:0] exp_v;
      // U never leaves the N-bit signed range between iterations.
      u_in         = (N+1)'($signed(N'($urandom)));
      v_in         = N'($urandom);
      q_prev_in    = 1'($urandom);
      multiplicand = N'($urandom);
      if (t % 7 == 0) multiplicand = {1'b1, {(N-1){1'b0}}};
      if (t % 11 == 0) multiplicand = {1'b0, {(N-1){1'b1}}};
      #1;
      x  = longint'($signed(u_in)) * (longint'(1) << N) + longint'(v_in);
      mc = longint'($signed(multiplicand)) * (longint'(1) << N);
      case ({v_in[0], q_prev_in})
        2'b01: x = x + mc;
        2'b10: x = x - mc;
        default: ;
      endcase
      x_next = x >>> 1;
      exp_v  = N'(x_next);
      exp_u  = (N+1)'(x_next >>> N);
      seen[{v_in[0], q_prev_in}]++;
      checks++;
      if (u_out != exp_u || v_out != exp_v || q_prev_out != v_in[0]) begin
        failures++;
        $display("FAIL u=%h v=%h q=%b m=%h: got %h %h %b exp %h %h",
                 u_in, v_in, q_prev_in, multiplicand, u_out, v_out, q_prev_out, exp_u, exp_v);
      end
      checks++;
      if (op != (({v_in[0], q_prev_in} == 2'b01) ? BOOTH_ADD :
                 ({v_in[0], q_prev_in} == 2'b10) ? BOOTH_SUB : BOOTH_SHIFT)) begin
        failures++;
        $display("FAIL op for pair %b", {v_in[0], q_prev_in});
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL bit pair %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
