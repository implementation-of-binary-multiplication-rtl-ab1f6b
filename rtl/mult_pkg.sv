// mult_pkg: types and helper functions shared by the N-bit binary multiplier.
//
// booth_op_e names the three things a radix-2 Booth iteration can do with the
// multiplicand, chosen from the multiplier's current bit and the bit shifted
// out just before it: 00 and 11 only shift, 01 adds, 10 subtracts. That table
// is the classic Booth rule. bit_changes() counts the 0-to-1 and 1-to-0
// transitions in a word read from its least significant end, with an implied
// 0 to the right of bit 0; it equals the number of add or subtract steps Booth
// recoding performs when that word is the multiplier. Counting the implied 0
// is this design's choice, made so that the count matches the work done.
package mult_pkg;

  typedef enum logic [1:0] {
    BOOTH_SHIFT = 2'd0,  // bit pair 00 or 11: shift only
    BOOTH_ADD   = 2'd1,  // bit pair 01: U := U + multiplicand, then shift
    BOOTH_SUB   = 2'd2   // bit pair 10: U := U - multiplicand, then shift
  } booth_op_e;

  // Booth recoding of the pair {current multiplier bit, previous bit}.
  function automatic booth_op_e booth_decode(input logic q0, input logic q_prev);
    unique case ({q0, q_prev})
      2'b01:   return BOOTH_ADD;
      2'b10:   return BOOTH_SUB;
      default: return BOOTH_SHIFT;
    endcase
  endfunction

endpackage
