// tb_boothrecodemul8: self-checking testbench of the fixed-rate 8-bit
// radix-4 Booth multiplier.
//  1. Replays the reference run 51 x -61: checks the product register after
//     load and after each of the four run clocks (102, 7833, -5850, 6345,
//     -6222), the final product -3111 and that done rises N/2 + 2 = 6 clocks after the clock
//     that saw go. The register is watched through its product bits
//     [2N:1], so the expected outputs are 51, 3916, -2925, 3172 and -3111
//     (the sums 61, -46, 49, -49 show in the accumulator part of these).
//  2. All 65536 operand pairs: product against the integer product, and the
//     same latency for every one.
//  3. done stays high while go is held and drops after go is released.
//  4. An unsigned instance (SIGNED = 0): all 65536 unsigned operand pairs,
//     with the latency of one digit more, N/2 + 3 = 7 clocks.
module tb_boothrecodemul8;
  localparam int N = 8;

  logic iClk = 0, iReset_b = 0, iGo = 0;
  logic [N-1:0] iMer, iMand;
  logic oDone;
  logic signed [2*N-1:0] oProduct;
  int checks = 0, failures = 0;

  boothrecodemul8 #(.N(N)) dut (.*);

  logic uGo = 0, uDone;
  logic [N-1:0] uMer = '0, uMand = '0;
  logic [2*N-1:0] uProduct;
  boothrecodemul8 #(.N(N), .SIGNED(1'b0)) dutu (
    .iClk, .iReset_b, .iGo(uGo), .iMer(uMer), .iMand(uMand),
    .oDone(uDone), .oProduct(uProduct)
  );

  always #5 iClk = ~iClk;

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

  // Start a multiplication and wait for done; returns clocks from the clock
  // that samples go to the clock after which done is first seen high.
  task automatic run(input int a, input int b, output int cycles,
                     output logic signed [2*N-1:0] p);
    iMer = N'(a); iMand = N'(b); iGo = 1;
    cycles = 0;
    do begin
      @(negedge iClk);
      cycles++;
    end while (!oDone && cycles < 100);
    p = oProduct;
    iGo = 0;
    @(negedge iClk);
    check(!oDone, "done should drop after go is released");
  endtask

  int exp_out [5] = '{51, 3916, -2925, 3172, -3111};

  initial begin
    int cycles;
    logic signed [2*N-1:0] p;
    iMer = '0; iMand = '0;
    repeat (2) @(negedge iClk);
    iReset_b = 1;
    @(negedge iClk);

    // 1. reference run
    iMer = 8'd51; iMand = 8'(-61); iGo = 1;
    @(negedge iClk);                        // idle -> load
    check(!oDone, "done low after start");
    @(negedge iClk);                        // load done
    check(int'(oProduct) == exp_out[0], $sformatf("loaded register gives %0d", oProduct));
    for (int i = 0; i < 4; i++) begin
      check(!oDone, "done low while running");
      @(negedge iClk);
      check(int'(oProduct) == exp_out[i+1],
            $sformatf("product bits %0d after step %0d", oProduct, i));
    end
    check(oDone, "done after four run clocks");
    check(oProduct == -16'sd3111, $sformatf("51 x -61 = %0d", oProduct));
    // 3. done held with go
    repeat (3) @(negedge iClk);
    check(oDone && oProduct == -16'sd3111, "done and product hold while go is high");
    iGo = 0;
    @(negedge iClk);
    check(!oDone, "done drops after go low");
    @(negedge iClk);

    // 2. exhaustive
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        run(a, b, cycles, p);
        check(int'(p) == a * b, $sformatf("%0d x %0d = %0d", a, b, p));
        check(cycles == N/2 + 2, $sformatf("latency %0d for %0d x %0d", cycles, a, b));
      end

    // 4. unsigned instance
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        uMer = N'(a); uMand = N'(b); uGo = 1;
        cycles = 0;
        do begin
          @(negedge iClk);
          cycles++;
        end while (!uDone && cycles < 100);
        check(int'(uProduct) == a * b, $sformatf("unsigned %0d x %0d = %0d", a, b, uProduct));
        check(cycles == N/2 + 3, $sformatf("unsigned latency %0d", cycles));
        uGo = 0;
        @(negedge iClk);
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
