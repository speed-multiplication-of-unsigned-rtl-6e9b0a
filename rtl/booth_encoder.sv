// booth_encoder: radix-4 Booth encoder.
//
// Combinational. Takes the three low bits of the product register (the
// "E" bits: two multiplier bits and the bit shifted out before them) and
// returns the Booth digit from the radix-4 recoding table, plus a skip flag
// that is high when the digit is zero (bit patterns 000 and 111). The digit
// table is the standard published one; the skip output is what the
// two-speed controller uses to bypass the add path. No clock, no latency.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   e_bits,  // {b(2i+1), b(2i), b(2i-1)}
  output booth_digit_e digit,   // recoded digit
  output logic         skip     // digit is zero: no addition needed
);

  always_comb begin
    digit = booth_recode(e_bits);
    skip  = (digit == BD_ZERO);
  end

endmodule
