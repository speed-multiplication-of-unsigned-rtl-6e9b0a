// tb_booth_ppg: exhaustive check of the partial product generator at N = 8:
// every multiplicand with every Booth digit, compared with the integer
// product digit * multiplicand. A few random 64-bit cases check the default
// width of the two-speed multiplier.
module tb_booth_ppg;
  import booth_pkg::*;

  localparam int N = 8;
  logic signed [N-1:0]  mcand;
  booth_digit_e         digit;
  logic signed [N+1:0]  pp;
  logic signed [63:0]   mcand64;
  logic signed [65:0]   pp64;
  int checks = 0, failures = 0;

  booth_ppg #(.N(N))  dut   (.mcand(mcand),   .digit(digit), .pp(pp));
  booth_ppg #(.N(64)) dut64 (.mcand(mcand64), .digit(digit), .pp(pp64));

  booth_digit_e digits [5] = '{BD_ZERO, BD_P1, BD_P2, BD_M1, BD_M2};
  int           factor [5] = '{0, 1, 2, -1, -2};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mcand64 = '0;
    for (int m = -128; m < 128; m++) begin
      for (int d = 0; d < 5; d++) begin
        mcand = N'(m);
        digit = digits[d];
        #1;
        checks++;
        if (int'(pp) != factor[d] * m) begin
          failures++;
          $display("FAIL m=%0d digit=%0d: pp=%0d", m, factor[d], pp);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      logic signed [65:0] expv;
      mcand64 = {$urandom, $urandom};
      for (int d = 0; d < 5; d++) begin
        digit = digits[d];
        #1;
        expv = 66'(mcand64) * 66'(factor[d]);
        checks++;
        if (pp64 != expv) begin
          failures++;
          $display("FAIL 64-bit m=%0d digit=%0d: pp=%0d", mcand64, factor[d], pp64);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
