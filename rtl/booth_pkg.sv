// booth_pkg: types and functions shared by the radix-4 Booth multipliers.
//
// A radix-4 (modified) Booth digit is taken from three overlapping multiplier
// bits {b(2i+1), b(2i), b(2i-1)} and is one of 0, +1, +2, -1, -2 times the
// multiplicand. The mapping below is the standard radix-4 recoding table:
//   000 -> 0    001 -> +1   010 -> +1   011 -> +2
//   100 -> -2   101 -> -1   110 -> -1   111 -> 0
// The enum encoding of the digit is this design's own choice.
package booth_pkg;

  typedef enum logic [2:0] {
    BD_ZERO = 3'd0,
    BD_P1   = 3'd1,
    BD_P2   = 3'd2,
    BD_M1   = 3'd3,
    BD_M2   = 3'd4
  } booth_digit_e;

  // Radix-4 Booth recoding of one bit triplet {b(2i+1), b(2i), b(2i-1)}.
  function automatic booth_digit_e booth_recode(input logic [2:0] triplet);
    booth_digit_e d;
    unique case (triplet)
      3'b000:  d = BD_ZERO;
      3'b001:  d = BD_P1;
      3'b010:  d = BD_P1;
      3'b011:  d = BD_P2;
      3'b100:  d = BD_M2;
      3'b101:  d = BD_M1;
      3'b110:  d = BD_M1;
      default: d = BD_ZERO;  // 3'b111
    endcase
    return d;
  endfunction

endpackage
