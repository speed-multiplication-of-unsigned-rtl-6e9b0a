// tb_tsm_control: checks the two-speed controller at N = 8 (four digits)
// and K = 3. For every one of the 16 zero / nonzero digit patterns the
// testbench plays the encoder: it holds skip for the current digit and moves
// to the next digit when it sees ena at a clock edge. It checks that
//  - load is a single pulse in the clock that sees go,
//  - a zero digit is taken in its first clock with shift high,
//  - a nonzero digit is taken after exactly K clocks with shift low,
//  - done rises after 1 + Z + K*(4 - Z) clocks and busy is high in between,
//  - done holds while go is high and drops once go is low.
module tb_tsm_control;
  localparam int N = 8;
  localparam int K = 3;
  localparam int D = N / 2;

  logic clk = 0, rst_n = 0, go = 0, skip = 0;
  logic load, ena, shift, busy, done;
  int checks = 0, failures = 0;

  tsm_control #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && !load && !ena, "idle after reset");
    for (int pat = 0; pat < 16; pat++) begin
      int z, cycles, expected, digit, in_digit;
      bit took;
      z = 0;
      for (int d = 0; d < D; d++) z += pat[d];
      expected = 1 + z + K * (D - z);
      go = 1;
      #1 check(load, "load with go in idle");
      @(negedge clk);
      go = 0;
      cycles = 1;
      digit = 0;
      in_digit = 0;
      while (!done && cycles < 100) begin
        skip = pat[digit];
        #1;
        check(busy && !load, "busy, no load while running");
        in_digit++;
        if (skip) begin
          check(ena && shift, $sformatf("pattern %4b digit %0d: zero digit taken at once", pat, digit));
        end else begin
          check(ena == (in_digit == K) && !shift,
                $sformatf("pattern %4b digit %0d: add enable in clock %0d", pat, digit, in_digit));
        end
        took = ena;
        @(negedge clk);
        cycles++;
        if (took) begin
          digit++;
          in_digit = 0;
        end
      end
      check(cycles == expected, $sformatf("pattern %4b: %0d clocks, expected %0d", pat, cycles, expected));
      check(digit == D, $sformatf("pattern %4b: %0d digits consumed", pat, digit));
      go = 1;
      @(negedge clk);
      check(done && !load && !busy, "done holds while go is high");
      go = 0;
      @(negedge clk);
      check(!done && !busy, "back to idle once go is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
