// tb_paper_examples: the worked examples of the source design, applied to
// the N-bit multiplier at the widths they were shown at.
//   3 bits, unsigned: 111 x 011 = 010101            (7 x 3 = 21)
//   4 bits, signed:   1111 x 0011 = 11111101        (-1 x 3 = -3)
//   8 bits, signed:   00011001 x 11100111 = 1111110110001111 (25 x -25 = -625)
//   8 bits, unsigned and signed with two negatives: random vectors against
//   integer products.
module tb_paper_examples;
  logic [2:0]  a3, b3;
  logic [5:0]  m3;
  logic [3:0]  a4, b4;
  logic [7:0]  m4;
  logic [7:0]  a8, b8;
  logic [15:0] m8;
  logic        s3, s4, s8;
  int checks = 0, failures = 0;

  nbit_multiplier #(.N(3)) dut3 (.a(a3), .b(b3), .sign(s3), .m(m3));
  nbit_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .sign(s4), .m(m4));
  nbit_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .sign(s8), .m(m8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a3 = 3'b111; b3 = 3'b011; s3 = 1'b0;
    a4 = 4'b1111; b4 = 4'b0011; s4 = 1'b1;
    a8 = 8'b00011001; b8 = 8'b11100111; s8 = 1'b1;
    #1;
    check(m3 == 6'b010101, "3-bit unsigned 7 x 3");
    check(m4 == 8'b11111101, "4-bit signed -1 x 3");
    check(m8 == 16'b1111110110001111, "8-bit signed 25 x -25");
    // 8-bit unsigned and 8-bit signed with two negative operands.
    for (int t = 0; t < 2000; t++) begin
      int x, y;
      x = int'($urandom_range(255));
      y = int'($urandom_range(255));
      a8 = 8'(x); b8 = 8'(y); s8 = 1'b0;
      #1;
      check(int'(m8) == x * y, $sformatf("8-bit unsigned %0d x %0d", x, y));
      x = -int'($urandom_range(128, 1));
      y = -int'($urandom_range(128, 1));
      a8 = 8'(x); b8 = 8'(y); s8 = 1'b1;
      #1;
      check(m8 == 16'(x * y), $sformatf("8-bit signed %0d x %0d", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
