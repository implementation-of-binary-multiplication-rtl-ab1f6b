// tb_booth_multiplier: self-checking test of the signed Booth multiplier.
// Instances of 1 and 5 bits are checked on all operand pairs and an 8-bit
// instance on all 65536 pairs. The reference product is the integer product
// of the sign-extended operands. The operand swap and the add and subtract
// step counts are checked against counts worked out from the operands' bit
// changes. The signed examples of the source are included: -1 x 3 = -3 at
// 4 bits and 25 x -25 = -625 at 8 bits.
module tb_booth_multiplier;
  localparam int NS  = 5;
  localparam int NL  = 8;
  localparam int NV  = 4;

  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] ps;
  logic            sw_s;
  logic [$clog2(NS+1)-1:0] adds_s, subs_s;

  logic [NL-1:0]   al, bl;
  logic [2*NL-1:0] pl;
  logic            sw_l;
  logic [$clog2(NL+1)-1:0] adds_l, subs_l;

  logic [NV-1:0]   av, bv;
  logic [2*NV-1:0] pv;
  logic            sw_v;
  logic [$clog2(NV+1)-1:0] adds_v, subs_v;

  logic [0:0]      a1, b1;
  logic [1:0]      p1;
  logic            sw_1;
  logic [0:0]      adds_1, subs_1;

  int checks = 0, failures = 0;
  int n_swap = 0, n_max_neg = 0;

  booth_multiplier #(.N(NS)) dut_s (.a(as), .b(bs), .p(ps), .swapped(sw_s),
                                    .add_count(adds_s), .sub_count(subs_s));
  booth_multiplier #(.N(NL)) dut_l (.a(al), .b(bl), .p(pl), .swapped(sw_l),
                                    .add_count(adds_l), .sub_count(subs_l));
  booth_multiplier #(.N(1))  dut_1 (.a(a1), .b(b1), .p(p1), .swapped(sw_1),
                                    .add_count(adds_1), .sub_count(subs_1));
  booth_multiplier #(.N(NV)) dut_v (.a(av), .b(bv), .p(pv), .swapped(sw_v),
                                    .add_count(adds_v), .sub_count(subs_v));

  // Number of 0->1 (add) and 1->0 (subtract) edges read from bit 0 upwards,
  // with an implied 0 right of bit 0: a 1 above a 0 means subtract.
  function automatic void ref_ops(input longint w, input int n, output int adds, output int subs);
    int prev;
    adds = 0;
    subs = 0;
    prev = 0;
    for (int i = 0; i < n; i++) begin
      int cur;
      cur = int'((w >> i) & 1);
      if (cur == 1 && prev == 0) subs++;
      if (cur == 0 && prev == 1) adds++;
      prev = cur;
    end
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Checks one instance's outputs against the reference.
  task automatic check_one(input longint a, input longint b, input int n,
                           input longint p, input bit sw,
                           input int adds, input int subs);
    longint sa, sb, prod, mask;
    int aa, as_, ba, bs_;
    bit exp_sw;
    mask = (longint'(1) << (2 * n)) - 1;
    sa   = (a >= (longint'(1) << (n - 1))) ? a - (longint'(1) << n) : a;
    sb   = (b >= (longint'(1) << (n - 1))) ? b - (longint'(1) << n) : b;
    prod = (sa * sb) & mask;
    check(p == prod, $sformatf("N=%0d product %0d x %0d: got %h exp %h", n, sa, sb, p, prod));
    ref_ops(a, n, aa, as_);
    ref_ops(b, n, ba, bs_);
    exp_sw = (aa + as_) < (ba + bs_);
    check(sw == exp_sw, $sformatf("N=%0d swap %0d x %0d", n, sa, sb));
    if (exp_sw)
      check(adds == aa && subs == as_, $sformatf("N=%0d step count (a) %0d x %0d", n, sa, sb));
    else
      check(adds == ba && subs == bs_, $sformatf("N=%0d step count (b) %0d x %0d", n, sa, sb));
    if (sw) n_swap++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Examples from the source: 1111 x 0011 = 11111101 and
    // 00011001 x 11100111 = 1111110110001111.
    av = 4'b1111; bv = 4'b0011;
    al = 8'b00011001; bl = 8'b11100111;
    #1;
    check(pv == 8'b11111101, "-1 x 3 at 4 bits");
    check(pl == 16'b1111110110001111, "25 x -25 at 8 bits");

    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        a1 = 1'(i); b1 = 1'(j);
        #1;
        check_one(i, j, 1, longint'(p1), sw_1, int'(adds_1), int'(subs_1));
      end
    for (int i = 0; i < (1 << NS); i++)
      for (int j = 0; j < (1 << NS); j++) begin
        as = NS'(i); bs = NS'(j);
        #1;
        check_one(i, j, NS, longint'(ps), sw_s, int'(adds_s), int'(subs_s));
      end
    for (int i = 0; i < (1 << NL); i++)
      for (int j = 0; j < (1 << NL); j++) begin
        al = NL'(i); bl = NL'(j);
        #1;
        check_one(i, j, NL, longint'(pl), sw_l, int'(adds_l), int'(subs_l));
        if (al == 8'h80 && bl == 8'h80) n_max_neg++;
      end
    check(n_swap > 0 && n_max_neg == 1, "swap and most-negative operands exercised");
    $display("swaps=%0d", n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
