// booth_product_reg: product shift register of a serial radix-4 Booth
// multiplier, with its adder.
//
// The register is 2N+3 bits wide: {A, Q, Q-1}. A (N+2 bits, the top) is the
// running partial sum, Q (N bits) holds the multiplier, and Q-1 is the bit
// shifted out of Q, initially 0. The three low bits {Q[1], Q[0], Q-1} are the
// E bits read by the Booth encoder. For N = 8 this is the 19-bit
// Product[18:0] register of the published 8-bit design; the product is
// read from bits [2N:1].
//
// Operation, on the rising clock edge (all synchronous):
//   rst_n low          register cleared
//   load               register <= {0, mer, 0}
//   ena & !shift       A <= A + pp, then the whole register shifts right
//                      arithmetically by two (one radix-4 digit consumed)
//   ena &  shift       shift right arithmetically by two without adding
//                      (a skipped zero digit)
// load has priority over ena. sum shows A + pp combinationally (the "Sum"
// signal of the published simulation trace).
module booth_product_reg #(
  parameter int unsigned N = 8  // operand width
) (
  input  logic                 clk,
  input  logic                 rst_n,    // synchronous, active low
  input  logic                 load,     // load a new multiplier
  input  logic                 ena,      // register enable (consume a digit)
  input  logic                 shift,    // with ena: shift only, no add
  input  logic        [N-1:0]  mer,      // multiplier
  input  logic signed [N+1:0]  pp,       // partial product from the generator
  output logic        [2:0]    e_bits,   // {Q[1], Q[0], Q-1} for the encoder
  output logic signed [N+1:0]  sum,      // A + pp
  output logic signed [2*N-1:0] product  // current product bits [2N:1]
);

  localparam int unsigned W = 2*N + 3;

  logic signed [W-1:0] preg;
  logic signed [W-1:0] next_add;

  always_comb begin
    sum      = preg[W-1 -: N+2] + pp;
    next_add = {sum, preg[N:0]};
    e_bits   = preg[2:0];
    product  = preg[2*N:1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      preg <= '0;
    else if (load)
      preg <= {{(N+2){1'b0}}, mer, 1'b0};
    else if (ena)
      preg <= shift ? (preg >>> 2) : (next_add >>> 2);
  end

endmodule
