// tb_tsm_workloads: runs input sets of the kinds the two-speed multiplier
// is meant for through a 64-bit and a 32-bit instance (K = 2) and reports
// the mean latency against the fixed-rate serial schedule, in which every
// digit takes the K-clock add path (1 + K*N/2 clocks).
// Input sets (the multiplier operand; the multiplicand is uniform):
//   uniform-N    uniformly random N-bit values
//   uniform-32   32-bit uniform values sign-extended into the 64-bit unit
//   gaussian-8   8-bit values, approximately Gaussian (sum of four uniform
//                numbers in [-32, 32], clipped to [-128, 127])
//   sparse-8     gaussian-8 with about 70% of values set to zero, standing
//                in for pruned / ReLU neural-network data
// The distributions' parameters are this testbench's own. Every product
// and every latency (1 + Z + K*(N/2 - Z) for Z zero digits) is checked;
// the mean speed-up must exceed 1 for every set with small values.
module tb_tsm_workloads;
  localparam int K = 2;
  localparam int OPS = 400;

  logic clk = 0, rst_n = 0;
  logic go64 = 0, go32 = 0;
  logic [63:0] mer64, mcand64;
  logic [31:0] mer32, mcand32;
  logic busy64, done64, busy32, done32;  // busy is not needed here
  logic signed [127:0] product64;
  logic signed [63:0]  product32;
  int checks = 0, failures = 0;

  tsm_multiplier #(.N(64), .K(K)) u64 (
    .clk, .rst_n, .go(go64), .mer(mer64), .mcand(mcand64),
    .busy(busy64), .done(done64), .product(product64)
  );
  tsm_multiplier #(.N(32), .K(K)) u32 (
    .clk, .rst_n, .go(go32), .mer(mer32), .mcand(mcand32),
    .busy(busy32), .done(done32), .product(product32)
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  function automatic int zero_digits(logic [63:0] x, int n);
    int z = 0;
    logic prev = 1'b0;
    for (int i = 0; i < n / 2; i++) begin
      if (x[2*i] == prev && x[2*i+1] == prev) z++;
      prev = x[2*i+1];
    end
    return z;
  endfunction

  function automatic longint gauss8();
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 64)) - 32;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    return longint'(s);
  endfunction

  function automatic longint draw(int set);
    case (set)
      0: return longint'({$urandom, $urandom});
      1: return longint'($signed($urandom));
      2: return gauss8();
      default: return ($urandom_range(0, 9) < 7) ? 64'sd0 : gauss8();
    endcase
  endfunction

  // One multiplication; returns its latency in clocks.
  task automatic mul(int n, longint a, longint b, output int cycles);
    int expected, z;
    if (n == 64) begin
      mer64 = 64'(a); mcand64 = 64'(b); go64 = 1;
    end else begin
      mer32 = 32'(a); mcand32 = 32'(b); go32 = 1;
    end
    @(negedge clk);
    cycles = 1;
    while (!(n == 64 ? done64 : done32) && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    go64 = 0; go32 = 0;
    z = zero_digits(64'(a), n);
    expected = 1 + z + K * (n/2 - z);
    if (n == 64)
      check(product64 == 128'(a) * 128'(b), $sformatf("64-bit %0d x %0d", a, b));
    else
      check(product32 == 64'(a) * 64'(b), $sformatf("32-bit %0d x %0d", a, b));
    check(cycles == expected, $sformatf("%0d-bit latency %0d expected %0d", n, cycles, expected));
    @(negedge clk);
  endtask

  string set_name [4] = '{"uniform-N", "uniform-32", "gaussian-8", "sparse-8"};

  initial begin
    mer64 = '0; mcand64 = '0; mer32 = '0; mcand32 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (set_name[s]) begin
      for (int ni = 0; ni < 2; ni++) begin
        automatic int n = (ni == 0) ? 64 : 32;
        automatic longint total = 0;
        real mean, speedup;
        for (int i = 0; i < OPS; i++) begin
          int c;
          longint a, b;
          c = 0;
          a = draw(s);
          if (n == 32) a = longint'($signed(32'(a)));
          b = (n == 64) ? longint'({$urandom, $urandom}) : longint'($signed($urandom));
          mul(n, a, b, c);
          total += longint'(c);
        end
        mean = real'(total) / OPS;
        speedup = real'(1 + K * n / 2) / mean;
        $display("set %-10s on %0d-bit unit: mean latency %0.2f clocks, fixed-rate %0d, speed-up %0.2f",
                 set_name[s] == "uniform-N" ? $sformatf("uniform-%0d", n) : set_name[s],
                 n, mean, 1 + K * n / 2, speedup);
        if (s != 0 && !(s == 1 && n == 32))
          check(speedup > 1.0, $sformatf("no speed-up for %s on %0d bits", set_name[s], n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
