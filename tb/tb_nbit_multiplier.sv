// tb_nbit_multiplier: end-to-end self-checking test of the N-bit multiplier
// at its default width (8 bits), with no parameter overridden.
// Every operand pair is applied in both modes: sign = 0 must give the
// unsigned product, sign = 1 the two's complement product, each computed
// here from integers. Mode switches are made on every vector (the mode
// alternates with unchanged operands). The test also counts how often each
// mechanism of the design acts: unsigned mode, signed mode, the Booth
// operand swap, Booth add steps, Booth subtract steps, and products of the
// most negative operand; any that never happens is a failure.
module tb_nbit_multiplier;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic           sign;
  logic [2*N-1:0] m;
  int checks = 0, failures = 0;
  int n_unsigned = 0, n_signed = 0, n_swap = 0, n_add = 0, n_sub = 0;
  int n_switch = 0, n_max_neg = 0;

  nbit_multiplier dut (.a(a), .b(b), .sign(sign), .m(m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic count_event(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%-24s %0d", what, n);
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sign = 1'b0;
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        int ua, ub, sa, sb;
        logic prev_sign;
        ua = i;
        ub = j;
        sa = (i >= (1 << (N - 1))) ? i - (1 << N) : i;
        sb = (j >= (1 << (N - 1))) ? j - (1 << N) : j;
        a  = N'(i);
        b  = N'(j);
        for (int s = 0; s < 2; s++) begin
          prev_sign = sign;
          sign = ((i + j + s) % 2 == 1);
          #1;
          if (sign != prev_sign) n_switch++;
          if (sign) begin
            n_signed++;
            check(m == (2*N)'(sa * sb), $sformatf("signed %0d x %0d got %h", sa, sb, m));
            if (dut.booth_swapped) n_swap++;
            if (dut.booth_adds != 0) n_add++;
            if (dut.booth_subs != 0) n_sub++;
            if (a == {1'b1, {(N-1){1'b0}}}) n_max_neg++;
          end else begin
            n_unsigned++;
            check(m == (2*N)'(ua * ub), $sformatf("unsigned %0d x %0d got %h", ua, ub, m));
          end
        end
      end
    count_event(n_unsigned, "unsigned (systolic)");
    count_event(n_signed, "signed (Booth)");
    count_event(n_switch, "mode switches");
    count_event(n_swap, "Booth operand swaps");
    count_event(n_add, "Booth add steps");
    count_event(n_sub, "Booth subtract steps");
    count_event(n_max_neg, "most negative operand");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
