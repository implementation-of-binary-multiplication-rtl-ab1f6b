// tb_systolic_multiplier: self-checking test of the unsigned systolic array
// multiplier. Instances of 1, 3 and 8 bits are checked on every operand pair
// against the integer product. The source's example 111 x 011 = 010101
// (7 x 3 = 21) is among the 3-bit cases and is also checked on its own.
module tb_systolic_multiplier;
  logic [0:0]  a1, b1;
  logic [1:0]  p1;
  logic [2:0]  a3, b3;
  logic [5:0]  p3;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  systolic_multiplier #(.N(1)) dut1 (.a(a1), .b(b1), .p(p1));
  systolic_multiplier #(.N(3)) dut3 (.a(a3), .b(b3), .p(p3));
  systolic_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a3 = 3'b111; b3 = 3'b011;
    #1;
    check(p3 == 6'b010101, "7 x 3 = 21 at 3 bits");
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        a1 = 1'(i); b1 = 1'(j);
        #1;
        check(int'(p1) == i * j, $sformatf("N=1 %0d x %0d", i, j));
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        check(int'(p3) == i * j, $sformatf("N=3 %0d x %0d got %0d", i, j, p3));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        check(int'(p8) == i * j, $sformatf("N=8 %0d x %0d got %0d", i, j, p8));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
