// tb_systolic_cell: exhaustive self-checking test of one systolic array cell.
// All 16 input combinations are applied; {carry_out, sum_out} must equal the
// integer sum (a_bit*b_bit) + sum_in + carry_in.
module tb_systolic_cell;
  logic a_bit, b_bit, sum_in, carry_in, sum_out, carry_out;
  int checks = 0, failures = 0;

  systolic_cell dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      int exp_v;
      {a_bit, b_bit, sum_in, carry_in} = 4'(k);
      #1;
      exp_v = int'(a_bit && b_bit) + int'(sum_in) + int'(carry_in);
      checks++;
      if ({carry_out, sum_out} != 2'(exp_v)) begin
        failures++;
        $display("FAIL in=%b got=%b exp=%0d", 4'(k), {carry_out, sum_out}, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
