// tb_radix4_mul_top: end-to-end test of radix4_mul_top at its default
// parameters (8-bit fixed-rate multiplier, 64-bit two-speed multiplier with
// K = 2). Both multipliers run at the same time from independent driver
// threads. Every product is checked against the integer product, and every
// latency against the expected clock count: N8/2 + 2 for the fixed-rate
// multiplier, 1 + Z + K*(N/2 - Z) for the two-speed one, Z being the number
// of zero Booth digits the testbench counts in the multiplier.
// Mechanisms counted, each of which must occur at least once:
//   b8 digits 0, +1, +2, -1, -2 used; b8 done held by go;
//   tsm zero digit skipped; tsm nonzero digit given K clocks;
//   tsm all-zero-digit multiplier; tsm done held by go;
//   both multipliers busy in the same clock.
module tb_radix4_mul_top;
  localparam int N8 = 8;
  localparam int N  = 64;
  localparam int K  = 2;

  logic clk = 0, rst_n = 0;
  logic b8_go = 0, tsm_go = 0;
  logic [N8-1:0] b8_mer, b8_mand;
  logic [N-1:0]  tsm_mer, tsm_mcand;
  logic b8_done, tsm_busy, tsm_done;
  logic signed [2*N8-1:0] b8_product;
  logic signed [2*N-1:0]  tsm_product;
  int checks = 0, failures = 0;
  bit b8_running = 0;

  // mechanism counters
  int n_digit[5];           // 0, +1, +2, -1, -2 digits used by b8
  int n_b8_hold = 0, n_skip = 0, n_add = 0, n_all_skip = 0, n_tsm_hold = 0, n_both = 0;

  radix4_mul_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // Booth digit values of a multiplier, worked out arithmetically.
  function automatic int digit_at(logic [63:0] x, int i);
    logic lo;
    lo = (i == 0) ? 1'b0 : x[2*i-1];
    return -2 * int'(x[2*i+1]) + int'(x[2*i]) + int'(lo);
  endfunction

  always @(negedge clk) if (b8_running && tsm_busy) n_both++;

  task automatic b8_mul(int a, int b, int hold);
    int cycles;
    b8_mer = N8'(a); b8_mand = N8'(b); b8_go = 1;
    b8_running = 1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!b8_done && cycles < 100);
    check(int'(b8_product) == a * b, $sformatf("b8 %0d x %0d = %0d", a, b, b8_product));
    check(cycles == N8/2 + 2, $sformatf("b8 latency %0d", cycles));
    for (int i = 0; i < N8/2; i++) begin
      int d = digit_at(64'(N8'(a)), i);
      n_digit[(d >= 0) ? d : 2 - d]++;
    end
    if (hold > 0) begin
      repeat (hold) @(negedge clk);
      check(b8_done && int'(b8_product) == a * b, "b8 done held while go is high");
      n_b8_hold++;
    end
    b8_go = 0;
    b8_running = 0;
    @(negedge clk);
    check(!b8_done, "b8 done drops");
  endtask

  task automatic tsm_mul(logic [N-1:0] a, logic [N-1:0] b, int hold);
    int cycles, z, expected;
    logic signed [2*N-1:0] expv;
    tsm_mer = a; tsm_mcand = b; tsm_go = 1;
    @(negedge clk);
    tsm_mer = {$urandom, $urandom}; tsm_mcand = {$urandom, $urandom};  // taken at start
    cycles = 1;
    while (!tsm_done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    z = 0;
    for (int i = 0; i < N/2; i++) if (digit_at(a, i) == 0) z++;
    expected = 1 + z + K * (N/2 - z);
    expv = (2*N)'($signed(a)) * (2*N)'($signed(b));
    check(tsm_product == expv, $sformatf("tsm %0d x %0d = %0d", $signed(a), $signed(b), tsm_product));
    check(cycles == expected, $sformatf("tsm latency %0d expected %0d", cycles, expected));
    if (tsm_product == expv && cycles == expected) begin
      n_skip += z;
      n_add  += N/2 - z;
      if (z == N/2) n_all_skip++;
    end
    if (hold > 0) begin
      repeat (hold) @(negedge clk);
      check(tsm_done && tsm_product == expv, "tsm done held while go is high");
      n_tsm_hold++;
    end
    tsm_go = 0;
    @(negedge clk);
    check(!tsm_done && !tsm_busy, "tsm back to idle");
  endtask

  initial begin
    b8_mer = '0; b8_mand = '0; tsm_mer = '0; tsm_mcand = '0;
    foreach (n_digit[i]) n_digit[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      begin
        b8_mul(51, -61, 3);
        b8_mul(-128, -128, 0);
        for (int i = 0; i < 2000; i++)
          b8_mul(int'($signed(8'($urandom))), int'($signed(8'($urandom))), (i % 97 == 0) ? 2 : 0);
      end
      begin
        tsm_mul(64'd51, -64'sd61, 2);
        tsm_mul('0, 64'h1234, 0);
        tsm_mul('1, 64'h7fff_ffff_ffff_ffff, 0);
        tsm_mul({1'b1, 63'b0}, {1'b1, 63'b0}, 0);
        for (int i = 0; i < 300; i++) begin
          logic [N-1:0] a;
          case (i % 3)
            0: a = {$urandom, $urandom};
            1: a = N'($signed(16'($urandom)));
            default: a = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
          endcase
          tsm_mul(a, {$urandom, $urandom}, (i % 50 == 0) ? 1 : 0);
        end
      end
    join
    $display("mechanisms: b8 digits 0:%0d +1:%0d +2:%0d -1:%0d -2:%0d, b8 hold %0d, tsm skip %0d, tsm add %0d, tsm all-skip %0d, tsm hold %0d, both busy %0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_b8_hold,
             n_skip, n_add, n_all_skip, n_tsm_hold, n_both);
    foreach (n_digit[i]) check(n_digit[i] > 0, $sformatf("b8 digit kind %0d never used", i));
    check(n_b8_hold > 0, "b8 done hold never happened");
    check(n_skip > 0, "tsm skip never happened");
    check(n_add > 0, "tsm K-clock add never happened");
    check(n_all_skip > 0, "tsm all-skip multiplier never happened");
    check(n_tsm_hold > 0, "tsm done hold never happened");
    check(n_both > 0, "multipliers never ran together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
