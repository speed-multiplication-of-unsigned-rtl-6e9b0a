// radix4_mul_top: the two radix-4 serial Booth multipliers side by side.
//
//   b8_*  : boothrecodemul8, the fixed-rate sequential radix-4 Booth
//           multiplier (N8 x N8 -> 2*N8 bits, one digit per clock,
//           N8/2 + 2 clocks from start to done).
//   tsm_* : tsm_multiplier, the two-speed variant (TSM_N x TSM_N ->
//           2*TSM_N bits) that skips zero Booth digits in one clock and gives
//           nonzero digits TSM_K clocks.
// Both share the clock and the synchronous active-low reset and otherwise
// work independently; each keeps its own start / done handshake, described
// in its own file. The defaults are the published widths: 8 bits for the
// implemented multiplier and 64 bits, the wider of the two TSM widths it
// evaluates (32-bit operands run on it sign-extended). Operands are two's
// complement unless B8_SIGNED / TSM_SIGNED is 0. TSM_K = 2 and the unsigned
// option are this design's choices.
module radix4_mul_top #(
  parameter int unsigned N8    = 8,
  parameter int unsigned TSM_N = 64,
  parameter int unsigned TSM_K = 2,
  parameter bit          B8_SIGNED  = 1'b1,  // 0: unsigned operands
  parameter bit          TSM_SIGNED = 1'b1   // 0: unsigned operands
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // fixed-rate 8-bit multiplier
  input  logic                      b8_go,
  input  logic         [N8-1:0]     b8_mer,
  input  logic         [N8-1:0]     b8_mand,
  output logic                      b8_done,
  output logic        [2*N8-1:0]    b8_product,
  // two-speed multiplier
  input  logic                      tsm_go,
  input  logic         [TSM_N-1:0]  tsm_mer,
  input  logic         [TSM_N-1:0]  tsm_mcand,
  output logic                      tsm_busy,
  output logic                      tsm_done,
  output logic        [2*TSM_N-1:0] tsm_product
);

  boothrecodemul8 #(.N(N8), .SIGNED(B8_SIGNED)) u_b8 (
    .iClk     (clk),
    .iReset_b (rst_n),
    .iGo      (b8_go),
    .iMer     (b8_mer),
    .iMand    (b8_mand),
    .oDone    (b8_done),
    .oProduct (b8_product)
  );

  tsm_multiplier #(.N(TSM_N), .K(TSM_K), .SIGNED(TSM_SIGNED)) u_tsm (
    .clk     (clk),
    .rst_n   (rst_n),
    .go      (tsm_go),
    .mer     (tsm_mer),
    .mcand   (tsm_mcand),
    .busy    (tsm_busy),
    .done    (tsm_done),
    .product (tsm_product)
  );

endmodule
