// tb_booth_operand_select: self-checking test of the Booth operand choice.
// For every pair of 6-bit operands (4096 pairs) the reference counts bit
// changes as the population count of w XOR (w << 1), which is the number of
// places where a bit differs from the one to its right (with a 0 right of
// bit 0). The operand with fewer changes must come out as the multiplier,
// ties keep b as the multiplier, and the counts must match.
module tb_booth_operand_select;
  localparam int N  = 6;
  localparam int CW = $clog2(N + 1);
  logic [N-1:0]  a, b, multiplicand, multiplier;
  logic          swapped;
  logic [CW-1:0] changes_a, changes_b;
  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0;

  booth_operand_select #(.N(N)) dut (.*);

  function automatic int ref_changes(input logic [N-1:0] w);
    logic [N-1:0] t;
    t = w ^ (w << 1);
    return $countones(t);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b", what, a, b);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        int ca, cb;
        bit exp_swap;
        a = N'(i);
        b = N'(j);
        #1;
        ca = ref_changes(a);
        cb = ref_changes(b);
        exp_swap = (ca < cb);
        check(int'(changes_a) == ca && int'(changes_b) == cb, "change count");
        check(swapped == exp_swap, "swap decision");
        check(multiplier == (exp_swap ? a : b) && multiplicand == (exp_swap ? b : a),
              "operand routing");
        if (swapped) n_swap++; else n_keep++;
      end
    end
    check(n_swap > 0 && n_keep > 0, "both choices exercised");
    $display("swapped=%0d kept=%0d", n_swap, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
