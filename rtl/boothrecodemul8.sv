// boothrecodemul8: sequential radix-4 Booth multiplier, N x N -> 2N bits
// (N = 8 by default). Operands are two's complement by default; with
// SIGNED = 0 they are unsigned.
//
// How it works: a four-state controller (idle, load, run, done) steps a
// product register {A, Q, Q-1} of 2N+3 bits. In the load state the
// multiplier is placed in Q with A and Q-1 cleared. In each run clock the
// Booth encoder reads {Q[1], Q[0], Q-1}, the partial product generator forms
// 0, +-M or +-2M of the multiplicand, the adder adds it to A and the register
// shifts right arithmetically by two. A shift counter (NumShifts, 2 bits at
// N = 8) starts at DIGITS-1 and counts down; the clock in which it reads 0 is
// the last run clock, after which the controller enters done and raises
// oDone. In unsigned mode both operands are zero-extended by two bits and
// multiplied as (N+2)-bit two's complement numbers, so DIGITS = N/2 + 1 and
// the register is 2N+7 bits; otherwise DIGITS = N/2.
//
// Interface and timing (all on the rising edge of iClk, reset synchronous):
//   iReset_b low     -> idle.
//   idle, iGo high   -> load (1 clock) -> run (DIGITS clocks) -> done.
//   done             -> oDone high; stays in done while iGo is high and
//                       returns to idle once iGo is low.
//   oProduct         -> low 2N bits of the product register's bits [2N:1];
//                       final once oDone rises, DIGITS + 2 clocks after the
//                       clock that sees iGo in idle.
//   iMand            -> used combinationally; hold it stable from load
//                       until oDone.
// The register layout, the state sequence and encoding (0 idle, 1 load,
// 2 run, 3 done), the counter and the port names follow the published 8-bit
// design and its simulation trace (51 x -61 = -3111 in four run clocks). The
// return from done to idle, the need to hold iMand and the unsigned mode
// (built by operand extension) are this design's choices. The internal Sum
// is kept under the name of the published trace for debugging and is not
// otherwise read.
module boothrecodemul8
  import booth_pkg::*;
#(
  parameter int unsigned N      = 8,     // operand width, even
  parameter bit          SIGNED = 1'b1   // 1: two's complement, 0: unsigned
) (
  input  logic                  iClk,
  input  logic                  iReset_b,  // synchronous, active low
  input  logic                  iGo,       // start a multiplication
  input  logic         [N-1:0]  iMer,      // multiplier
  input  logic         [N-1:0]  iMand,     // multiplicand
  output logic                  oDone,     // product valid
  output logic        [2*N-1:0] oProduct   // iMer * iMand
);

  // Unsigned operands are zero-extended by two bits and multiplied as
  // (N+2)-bit two's complement numbers: one Booth digit more.
  localparam int unsigned NI     = SIGNED ? N : N + 2;
  localparam int unsigned DIGITS = NI / 2;
  localparam int unsigned CW     = (DIGITS > 1) ? $clog2(DIGITS) : 1;

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_LOAD = 2'd1,
    S_RUN  = 2'd2,
    S_DONE = 2'd3
  } state_e;

  state_e          PresentState, NextState;
  logic [CW-1:0]   NumShifts;
  logic [2:0]      e_bits;
  booth_digit_e    digit;
  logic            skip_unused;
  logic signed [NI+1:0]  pp;
  logic signed [NI+1:0]  Sum;
  logic            load, ena;
  logic [NI-1:0]         mer_i, mand_i;
  logic [2*NI-1:0]       prod_i;

  assign mer_i    = NI'(iMer);    // zero extension when unsigned
  assign mand_i   = NI'(iMand);
  assign oProduct = prod_i[2*N-1:0];

  // ---------------- controller ----------------
  always_comb begin
    NextState = PresentState;
    unique case (PresentState)
      S_IDLE: if (iGo) NextState = S_LOAD;
      S_LOAD: NextState = S_RUN;
      S_RUN:  if (NumShifts == '0) NextState = S_DONE;
      S_DONE: if (!iGo) NextState = S_IDLE;
      default: NextState = S_IDLE;
    endcase
  end

  always_ff @(posedge iClk) begin
    if (!iReset_b) begin
      PresentState <= S_IDLE;
      NumShifts    <= '0;
    end else begin
      PresentState <= NextState;
      if (PresentState == S_LOAD)
        NumShifts <= CW'(DIGITS - 1);
      else if (PresentState == S_RUN)
        NumShifts <= NumShifts - 1'b1;
    end
  end

  assign load  = (PresentState == S_LOAD);
  assign ena   = (PresentState == S_RUN);
  assign oDone = (PresentState == S_DONE);

  // ---------------- datapath ----------------
  booth_encoder u_enc (
    .e_bits (e_bits),
    .digit  (digit),
    .skip   (skip_unused)
  );

  booth_ppg #(.N(NI)) u_ppg (
    .mcand (mand_i),
    .digit (digit),
    .pp    (pp)
  );

  // This multiplier adds in every run clock, also for a zero digit, so
  // shift-only is never used.
  booth_product_reg #(.N(NI)) u_preg (
    .clk     (iClk),
    .rst_n   (iReset_b),
    .load    (load),
    .ena     (ena),
    .shift   (1'b0),
    .mer     (mer_i),
    .pp      (pp),
    .e_bits  (e_bits),
    .sum     (Sum),
    .product (prod_i)
  );

  initial assert (N >= 2 && N % 2 == 0)
    else $error("boothrecodemul8: N must be even and at least 2");

endmodule
