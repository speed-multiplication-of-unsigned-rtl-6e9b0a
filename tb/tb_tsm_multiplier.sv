// tb_tsm_multiplier: checks the two-speed multiplier at its default size
// (N = 64, K = 2) and at N = 8, K = 3 exhaustively.
// Each product is compared with the integer product, and the latency with
// 1 + Z + K*(N/2 - Z), where Z, the number of zero Booth digits, is counted
// by the testbench from the multiplier's bits (a digit i is zero when bits
// 2i+1, 2i and 2i-1 are all equal, bit -1 being 0). The 64-bit operands are
// drawn from several sets: uniform, small values sign-extended, and sparse.
// Unsigned instances (SIGNED = 0) are checked at N = 64 (random) and N = 8
// (all pairs); they have one digit more, from the multiplier zero-extended
// by two bits.
module tb_tsm_multiplier;
  localparam int N  = 64;
  localparam int K  = 2;
  localparam int N8 = 8;
  localparam int K8 = 3;

  logic clk = 0, rst_n = 0;
  logic go = 0, go8 = 0;
  logic [N-1:0]  mer, mcand;
  logic [N8-1:0] mer8, mcand8;
  logic busy, done, busy8, done8;
  logic signed [2*N-1:0]  product;
  logic signed [2*N8-1:0] product8;
  int checks = 0, failures = 0;

  tsm_multiplier dut (
    .clk, .rst_n, .go, .mer, .mcand, .busy, .done, .product
  );
  tsm_multiplier #(.N(N8), .K(K8)) dut8 (
    .clk, .rst_n, .go(go8), .mer(mer8), .mcand(mcand8),
    .busy(busy8), .done(done8), .product(product8)
  );

  logic goU = 0, goU8 = 0, busyU, doneU, busyU8, doneU8;
  logic [N-1:0]  merU = '0, mcandU = '0;
  logic [N8-1:0] merU8 = '0, mcandU8 = '0;
  logic [2*N-1:0]  productU;
  logic [2*N8-1:0] productU8;
  tsm_multiplier #(.SIGNED(1'b0)) dutU (
    .clk, .rst_n, .go(goU), .mer(merU), .mcand(mcandU),
    .busy(busyU), .done(doneU), .product(productU)
  );
  tsm_multiplier #(.N(N8), .K(K8), .SIGNED(1'b0)) dutU8 (
    .clk, .rst_n, .go(goU8), .mer(merU8), .mcand(mcandU8),
    .busy(busyU8), .done(doneU8), .product(productU8)
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    mulU('1, '1);
    mulU({1'b1, 63'b0}, 64'd3);
    for (int i = 0; i < 200; i++)
      mulU({$urandom, $urandom}, {$urandom, $urandom});
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b += 5)
        mulU8(a, b);
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

  function automatic int zero_digits(logic [65:0] x, int n);
    int z = 0;
    logic prev = 1'b0;
    for (int i = 0; i < n / 2; i++) begin
      if (x[2*i] == prev && x[2*i+1] == prev) z++;
      prev = x[2*i+1];
    end
    return z;
  endfunction

  task automatic mul64(logic [N-1:0] a, logic [N-1:0] b);
    int cycles, expected;
    logic signed [2*N-1:0] expv;
    mer = a; mcand = b; go = 1;
    @(negedge clk);
    mer = '0; mcand = '0;   // operands are taken in the start clock
    cycles = 1;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    go = 0;
    expv = (2*N)'($signed(a)) * (2*N)'($signed(b));
    expected = 1 + zero_digits(66'(a), N) + K * (N/2 - zero_digits(66'(a), N));
    check(product == expv, $sformatf("%0d x %0d = %0d", $signed(a), $signed(b), product));
    check(cycles == expected, $sformatf("latency %0d, expected %0d, for %h", cycles, expected, a));
    @(negedge clk);
    check(!done, "done drops with go low");
  endtask

  task automatic mul8(int a, int b);
    int cycles, expected;
    mer8 = N8'(a); mcand8 = N8'(b); go8 = 1;
    @(negedge clk);
    go8 = 0;
    cycles = 1;
    while (!done8 && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    expected = 1 + zero_digits(66'(N8'(a)), N8) + K8 * (N8/2 - zero_digits(66'(N8'(a)), N8));
    check(int'(product8) == a * b, $sformatf("8-bit %0d x %0d = %0d", a, b, product8));
    check(cycles == expected, $sformatf("8-bit latency %0d, expected %0d", cycles, expected));
    @(negedge clk);
  endtask

  task automatic mulU(logic [N-1:0] a, logic [N-1:0] b);
    int cycles, expected, z;
    merU = a; mcandU = b; goU = 1;
    @(negedge clk);
    goU = 0;
    cycles = 1;
    while (!doneU && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    z = zero_digits({2'b00, a}, N + 2);
    expected = 1 + z + K * ((N + 2) / 2 - z);
    check(productU == (2*N)'(a) * (2*N)'(b), $sformatf("unsigned %0d x %0d = %0d", a, b, productU));
    check(cycles == expected, $sformatf("unsigned latency %0d, expected %0d", cycles, expected));
    @(negedge clk);
  endtask

  task automatic mulU8(int a, int b);
    int cycles, expected, z;
    merU8 = N8'(a); mcandU8 = N8'(b); goU8 = 1;
    @(negedge clk);
    goU8 = 0;
    cycles = 1;
    while (!doneU8 && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    z = zero_digits(66'(a), N8 + 2);
    expected = 1 + z + K8 * ((N8 + 2) / 2 - z);
    check(int'(productU8) == a * b, $sformatf("unsigned 8-bit %0d x %0d = %0d", a, b, productU8));
    check(cycles == expected, $sformatf("unsigned 8-bit latency %0d, expected %0d", cycles, expected));
    @(negedge clk);
  endtask

  initial begin
    mer = '0; mcand = '0; mer8 = '0; mcand8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // corner cases
    mul64('0, '0);
    mul64('1, '1);
    mul64({1'b1, 63'b0}, {1'b1, 63'b0});
    mul64({1'b0, {63{1'b1}}}, {1'b1, 63'b0});
    mul64(64'h5555_5555_5555_5555, 64'h1234_5678_9abc_def0);
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] a, b;
      int sel;
      sel = $urandom_range(0, 2);
      b = {$urandom, $urandom};
      if (sel == 0)
        a = {$urandom, $urandom};
      else if (sel == 1)
        a = N'($signed(8'($urandom)));           // small value, sign-extended
      else
        a = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};  // sparse
      mul64(a, b);
    end
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b += 3)
        mul8(a, b);
    mulU('1, '1);
    mulU({1'b1, 63'b0}, 64'd3);
    for (int i = 0; i < 200; i++)
      mulU({$urandom, $urandom}, {$urandom, $urandom});
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b += 5)
        mulU8(a, b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
