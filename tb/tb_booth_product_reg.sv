// tb_booth_product_reg: checks the product shift register at N = 8.
// The register {A, Q, Q-1} is modelled as one signed integer V: an
// add-and-shift step is V <- (V + pp * 2^(N+1)) >>> 2, a shift-only step
// V <- V >>> 2, load sets V = 2 * multiplier (unsigned). Random sequences of
// load / add / shift / idle clocks with random partial products are
// applied; after each clock the product bits, the E bits and the
// combinational sum are compared with the model. Values that would overflow
// the (N+2)-bit accumulator are avoided by restarting with a load every
// N/2 steps, as the multipliers do.
module tb_booth_product_reg;
  localparam int N = 8;
  localparam int W = 2*N + 3;

  logic clk = 0, rst_n = 0, load = 0, ena = 0, shift = 0;
  logic [N-1:0]        mer;
  logic signed [N+1:0] pp;
  logic [2:0]          e_bits;
  logic signed [N+1:0] sum;
  logic signed [2*N-1:0] product;
  longint model;
  int checks = 0, failures = 0, steps;

  booth_product_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    longint expected_prod;
    longint a;
    expected_prod = model >>> 1;
    checks++;
    if (longint'(product) != expected_prod || e_bits != 3'(model)) begin
      failures++;
      $display("FAIL %s: product=%0d e=%b, model V=%0d", what, product, e_bits, model);
    end
    a = model >>> (N+1);
    checks++;
    if (longint'(sum) != a + longint'(pp)) begin
      failures++;
      $display("FAIL %s: sum=%0d expected %0d", what, sum, a + longint'(pp));
    end
  endtask

  initial begin
    mer = '0; pp = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    model = 0;
    compare("reset");
    steps = 0;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      load = 0; ena = 0; shift = 0;
      mer = N'($urandom);
      pp  = (N+2)'(int'($urandom_range(0, 4)) - 2) * (N+2)'($signed(N'($urandom)));
      if (steps == 0 || steps >= N/2 || r == 0) begin
        load = 1;
        // load wins over ena
        ena = r[0];
      end else if (r < 6) begin
        ena = 1;
      end else if (r < 9) begin
        ena = 1; shift = 1;
      end
      #1 compare("before edge");
      @(negedge clk);
      if (load) begin
        model = longint'({1'b0, mer}) * 2;
        steps = 1;
      end else if (ena && !shift) begin
        model = (model + (longint'(pp) <<< (N+1))) >>> 2;
        steps++;
      end else if (ena) begin
        model = model >>> 2;
        steps++;
      end
      // wrap the model to the register width, sign included
      model = longint'($signed(W'(model)));
      compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
