// tsm_multiplier: two-speed (TSM) serial-parallel radix-4 Booth multiplier,
// N x N -> 2N bits. Operands are two's complement by default; with
// SIGNED = 0 they are unsigned (zero-extended by two bits inside and
// multiplied as (N+2)-bit two's complement numbers: one digit more).
//
// Idea: a serial Booth multiplier spends one addition per radix-4 digit, but
// a digit whose three bits are 000 or 111 contributes nothing. This
// multiplier splits its datapath in two. The short part - the product
// register and its shift by two - runs in one clock. The long part - Booth
// encoder, partial product generator and adder - is given K clocks. Zero
// digits take only the short part, so the latency depends on the multiplier
// value: sparse operands, and small values sign-extended into a wide
// multiplier (whose upper digits are all 000 or 111), finish early.
//
// Blocks: booth_product_reg (product register with adder), booth_encoder
// (reads the register's three low bits, flags skip), booth_ppg (0, +-M,
// +-2M) and tsm_control (counts digits, issues shift / ena, waits K clocks
// for an add).
//
// Interface and timing (rising edge of clk, synchronous active-low reset):
//   go       -> sampled in idle; both operands are taken in that clock:
//               the multiplier into the product register, the multiplicand
//               into a holding register.
//   done     -> rises 1 + Z + K*(D - Z) clocks after the clock that took
//               go, for Z zero digits out of D (N/2 signed, N/2 + 1
//               unsigned); product is then valid and stays so
//               until the next start. The controller leaves done when go is
//               low.
//   busy     -> high while digits are processed.
// The two sub-circuits, the skip of zero digits and the operands taken in
// parallel follow the published design; the value of K, the handshake, the
// multiplicand register and the unsigned mode are this design's choices.
module tsm_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned N      = 64,   // operand width, even
  parameter int unsigned K      = 2,    // clocks of the add path (K*tau)
  parameter bit          SIGNED = 1'b1  // 1: two's complement, 0: unsigned
) (
  input  logic                  clk,
  input  logic                  rst_n,    // synchronous, active low
  input  logic                  go,       // start a multiplication
  input  logic         [N-1:0]  mer,      // multiplier x
  input  logic         [N-1:0]  mcand,    // multiplicand y
  output logic                  busy,     // digits being processed
  output logic                  done,     // product valid
  output logic        [2*N-1:0] product   // x * y
);

  localparam int unsigned NI = SIGNED ? N : N + 2;  // internal width

  logic [NI-1:0]        mcand_q;
  logic                 load, ena, shift, skip;
  logic [2:0]           e_bits;
  booth_digit_e         digit;
  logic signed [NI+1:0] pp;
  logic signed [NI+1:0] sum_unused;
  logic [2*NI-1:0]      prod_i;

  assign product = prod_i[2*N-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n)
      mcand_q <= '0;
    else if (load)
      mcand_q <= NI'(mcand);  // zero extension when unsigned
  end

  tsm_control #(.N(NI), .K(K)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .go    (go),
    .skip  (skip),
    .load  (load),
    .ena   (ena),
    .shift (shift),
    .busy  (busy),
    .done  (done)
  );

  booth_encoder u_enc (
    .e_bits (e_bits),
    .digit  (digit),
    .skip   (skip)
  );

  booth_ppg #(.N(NI)) u_ppg (
    .mcand (mcand_q),
    .digit (digit),
    .pp    (pp)
  );

  booth_product_reg #(.N(NI)) u_preg (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .ena     (ena),
    .shift   (shift),
    .mer     (NI'(mer)),
    .pp      (pp),
    .e_bits  (e_bits),
    .sum     (sum_unused),
    .product (prod_i)
  );

endmodule
