// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// All eight bit triplets are applied; the digit's value (-2..+2) and the
// skip flag are compared with values worked out from the triplet's
// arithmetic meaning, -2*b2 + b1 + b0, rather than from a table.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]   e_bits;
  booth_digit_e digit;
  logic         skip;
  int checks = 0, failures = 0;

  booth_encoder dut (.e_bits(e_bits), .digit(digit), .skip(skip));

  function automatic int digit_value(booth_digit_e d);
    case (d)
      BD_P1:   return 1;
      BD_P2:   return 2;
      BD_M1:   return -1;
      BD_M2:   return -2;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int expv;
      e_bits = 3'(t);
      #1;
      expv = -2 * int'(e_bits[2]) + int'(e_bits[1]) + int'(e_bits[0]);
      checks++;
      if (digit_value(digit) != expv) begin
        failures++;
        $display("FAIL triplet %b: digit %0d, expected %0d", e_bits, digit_value(digit), expv);
      end
      checks++;
      if (skip != (expv == 0)) begin
        failures++;
        $display("FAIL triplet %b: skip %b", e_bits, skip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
