// mmpr_fsm2 - marking FSM of the modulus maxima pair recognition.
//
// The decision FSM raises QRS_candidate at the zero crossing inside a
// modulus maxima pair, before it knows whether the pair is complete. This
// FSM marks that position with a fixed delay:
//   SEEN_NONE      -> SEEN_CANDIDATE  when QRS_candidate = 1
//   SEEN_CANDIDATE                    counts DLY samples
//   SEEN_CANDIDATE -> SEEN_CONFIRM    when the count reaches DLY
//   SEEN_CONFIRM   -> SEEN_NONE       QRS_indication <= QRS_confirm
// so a confirmed beat gives a one-sample QRS_indication pulse DLY + 3
// samples after the sample in which FSM 1 set QRS_candidate (one to enter
// SEEN_CANDIDATE, DLY + 1 there, one in SEEN_CONFIRM). QRS_indication is
// cleared in every other sample.
//
// Inputs are sampled on cycles with en = 1. The states and actions follow
// the description; DLY is not given there and defaults to TOL (21 samples):
// that is late enough for FSM 1 to have either confirmed the pair or timed
// out, and early enough that QRS_confirm of a pair is still held.
module mmpr_fsm2
  import qrs_pkg::*;
#(
  parameter int unsigned DLY = DLY_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        qrs_candidate,
  input  logic        qrs_confirm,
  output logic        qrs_indication,
  output fsm2_state_e state
);

  localparam int unsigned CNT_W = $clog2(DLY + 1);

  logic [CNT_W-1:0] counter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= F2_SEEN_NONE;
      counter        <= '0;
      qrs_indication <= 1'b0;
    end else if (en) begin
      qrs_indication <= 1'b0;
      unique case (state)
        F2_SEEN_NONE: begin
          if (qrs_candidate) begin
            state   <= F2_SEEN_CANDIDATE;
            counter <= '0;
          end
        end
        F2_SEEN_CANDIDATE: begin
          if (counter >= CNT_W'(DLY)) begin
            state   <= F2_SEEN_CONFIRM;
            counter <= '0;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        F2_SEEN_CONFIRM: begin
          qrs_indication <= qrs_confirm;
          state          <= F2_SEEN_NONE;
          counter        <= '0;
        end
        default: begin
          state   <= F2_SEEN_NONE;
          counter <= '0;
        end
      endcase
    end
  end

endmodule
