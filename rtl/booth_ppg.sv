// booth_ppg: radix-4 Booth partial product generator.
//
// Combinational. Given an N-bit two's complement multiplicand M and a Booth
// digit, forms 0, +M, +2M, -M or -2M as an (N+2)-bit two's complement value,
// which is wide enough for -2 * (-2^(N-1)) = 2^N. The two shifted copies of
// the multiplicand (M and 2M, "Mand1" and "Mand2") and the negation follow
// the published 8-bit design, which uses separate add and subtract units for
// +-M and +-2M; here the negation is done once, in the generator, and a single
// adder follows (this design's choice, same function).
module booth_ppg
  import booth_pkg::*;
#(
  parameter int unsigned N = 8  // multiplicand width
) (
  input  logic signed [N-1:0] mcand,  // multiplicand M
  input  booth_digit_e        digit,  // Booth digit
  output logic signed [N+1:0] pp      // digit * M
);

  logic signed [N+1:0] m1, m2;

  always_comb begin
    m1 = (N+2)'(mcand);       // sign-extended M
    m2 = m1 <<< 1;            // 2M
    unique case (digit)
      BD_P1:   pp = m1;
      BD_P2:   pp = m2;
      BD_M1:   pp = -m1;
      BD_M2:   pp = -m2;
      default: pp = '0;
    endcase
  end

endmodule
