// tsm_control: controller of the two-speed radix-4 Booth multiplier.
//
// The multiplier's datapath has two parts with different critical paths: a
// short one (the product register shifting by two, one clock tau) and a long
// one (encoder, partial product generator and adder, given K clocks, K*tau).
// For each of the N/2 Booth digits the controller looks at skip from the
// encoder:
//   skip high (digit 0, bits 000 or 111): ena and shift in the same clock,
//             the register only shifts - one clock;
//   skip low: it waits K-1 clocks for the add path to settle, then raises ena
//             with shift low so the register takes the sum - K clocks.
// The long path may therefore be timed as a K-cycle multicycle path.
//
// Interface and timing (rising edge of clk, synchronous active-low reset):
//   go in idle  -> load for one clock (the product register takes the
//                  multiplier in that edge), then run.
//   run         -> N/2 digits, each 1 or K clocks, as above.
//   done        -> high from the edge that consumes the last digit; the
//                  controller returns to idle when go is low, so a held go
//                  does not restart it.
//   busy        -> high in run.
// Total from the clock that sees go to done: 1 + Z + K*(N/2 - Z) clocks for Z
// zero digits. The skip / shift / ena signals and the tau / K*tau split are
// from the published design; the state machine, the wait counter and the
// handshake are this design's.
module tsm_control #(
  parameter int unsigned N = 64,  // operand width, even
  parameter int unsigned K = 2    // clocks given to the add path
) (
  input  logic clk,
  input  logic rst_n,  // synchronous, active low
  input  logic go,     // start
  input  logic skip,   // current digit is zero
  output logic load,   // load the product register
  output logic ena,    // product register enable
  output logic shift,  // with ena: shift only
  output logic busy,   // multiplication in progress
  output logic done    // product valid
);

  localparam int unsigned DIGITS = N / 2;
  localparam int unsigned CW     = (DIGITS > 1) ? $clog2(DIGITS) : 1;
  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1;

  typedef enum logic [1:0] {
    C_IDLE = 2'd0,
    C_RUN  = 2'd1,
    C_DONE = 2'd2
  } cstate_e;

  cstate_e       state;
  logic [CW-1:0] digits_left;  // digits still to consume, minus one
  logic [KW-1:0] wait_cnt;     // clocks already spent on the current add
  logic          add_ready;
  logic          consume;

  always_comb begin
    add_ready = (wait_cnt == KW'(K - 1));
    load      = (state == C_IDLE) && go;
    busy      = (state == C_RUN);
    done      = (state == C_DONE);
    shift     = busy && skip;
    consume   = busy && (skip || add_ready);
    ena       = consume;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      digits_left <= '0;
      wait_cnt    <= '0;
    end else begin
      unique case (state)
        C_IDLE: begin
          wait_cnt <= '0;
          if (go) begin
            state       <= C_RUN;
            digits_left <= CW'(DIGITS - 1);
          end
        end
        C_RUN: begin
          if (consume) begin
            wait_cnt <= '0;
            if (digits_left == '0)
              state <= C_DONE;
            else
              digits_left <= digits_left - 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        C_DONE: if (!go) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  initial assert (N >= 2 && N % 2 == 0 && K >= 1)
    else $error("tsm_control: N must be even and at least 2, K at least 1");

endmodule
