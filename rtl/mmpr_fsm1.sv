// mmpr_fsm1 - decision FSM of the modulus maxima pair recognition.
//
// Walks through one modulus maxima pair of the wavelet coefficients:
//   SEEN_NONE     -> SEEN_PEAK     a peak above th_pos or below th_neg
//                                  (its direction is remembered)
//   SEEN_PEAK     -> SEEN_ZERO     a zero crossing; QRS_candidate <= 1
//   SEEN_PEAK     -> SEEN_OPPOSITE a valid peak of the opposite direction
//                                  (case 2); QRS_candidate <= 1, QRS_confirm <= 1
//   SEEN_ZERO     -> SEEN_OPPOSITE a valid peak of the opposite direction
//                                  (case 1); QRS_candidate <= 0, QRS_confirm <= 1
//   SEEN_PEAK/ZERO -> SEEN_NONE    after TOL samples without such an event
//   SEEN_OPPOSITE -> SEEN_NONE     after the refractory period RP; QRS_confirm
//                                  is held at 1 until then
// QRS_candidate is therefore a one-sample pulse (it is cleared by every
// sample spent in SEEN_ZERO), and QRS_confirm is high for the whole stay in
// SEEN_OPPOSITE. One counter, cleared on every state change, measures TOL
// and RP in samples; it is compared before it is incremented, so a timeout
// happens on the (TOL+1)-th idle sample and SEEN_OPPOSITE lasts RP+1 samples.
//
// Inputs are sampled on cycles with en = 1 (one per processor sample):
// peak/peak_val from peak detection and the Z^-2 delay, zc from zero-crossing
// detection, th_pos/th_neg from threshold adjustment. The states, the
// actions and the values of TOL (0.07 s at 300 Sa/s) and RP (25 samples)
// follow the description; the priority between events that coincide
// (opposite peak, then zero crossing, then timeout) is a choice here.
module mmpr_fsm1
  import qrs_pkg::*;
#(
  parameter int unsigned W   = COEFF_W,
  parameter int unsigned TOL = TOL_DEF,
  parameter int unsigned RP  = RP_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  peak_e               peak,
  input  logic signed [W-1:0] peak_val,
  input  logic                zc,
  input  logic signed [W-1:0] th_pos,
  input  logic signed [W-1:0] th_neg,
  output logic                qrs_candidate,
  output logic                qrs_confirm,
  output fsm1_state_e         state
);

  localparam int unsigned MAXC  = (TOL > RP) ? TOL : RP;
  localparam int unsigned CNT_W = $clog2(MAXC + 1);

  logic [CNT_W-1:0] counter;
  logic             dir_neg;     // direction of the first valid peak

  logic pos_peak, neg_peak, valid_peak, opposite;

  assign pos_peak   = (peak != PK_NONE) && (peak_val > th_pos);
  assign neg_peak   = (peak != PK_NONE) && (peak_val < th_neg);
  assign valid_peak = pos_peak || neg_peak;
  assign opposite   = dir_neg ? pos_peak : neg_peak;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= F1_SEEN_NONE;
      counter       <= '0;
      dir_neg       <= 1'b0;
      qrs_candidate <= 1'b0;
      qrs_confirm   <= 1'b0;
    end else if (en) begin
      unique case (state)
        F1_SEEN_NONE: begin
          if (valid_peak) begin
            state   <= F1_SEEN_PEAK;
            dir_neg <= !pos_peak;
            counter <= '0;
          end
        end
        F1_SEEN_PEAK: begin
          if (opposite) begin
            state         <= F1_SEEN_OPPOSITE;
            qrs_candidate <= 1'b1;
            qrs_confirm   <= 1'b1;
            counter       <= '0;
          end else if (zc) begin
            state         <= F1_SEEN_ZERO;
            qrs_candidate <= 1'b1;
            counter       <= '0;
          end else if (counter >= CNT_W'(TOL)) begin
            state   <= F1_SEEN_NONE;
            counter <= '0;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        F1_SEEN_ZERO: begin
          qrs_candidate <= 1'b0;
          if (opposite) begin
            state       <= F1_SEEN_OPPOSITE;
            qrs_confirm <= 1'b1;
            counter     <= '0;
          end else if (counter >= CNT_W'(TOL)) begin
            state   <= F1_SEEN_NONE;
            counter <= '0;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        F1_SEEN_OPPOSITE: begin
          qrs_candidate <= 1'b0;
          if (counter >= CNT_W'(RP)) begin
            state       <= F1_SEEN_NONE;
            qrs_confirm <= 1'b0;
            counter     <= '0;
          end else begin
            qrs_confirm <= 1'b1;
            counter     <= counter + 1'b1;
          end
        end
        default: begin
          state   <= F1_SEEN_NONE;
          counter <= '0;
        end
      endcase
    end
  end

  // QRS_candidate is never high in SEEN_NONE or SEEN_PEAK
  a_cand_state: assert property (@(posedge clk) disable iff (!rst_n)
    qrs_candidate |-> (state == F1_SEEN_ZERO || state == F1_SEEN_OPPOSITE));
  // QRS_confirm is high exactly while in SEEN_OPPOSITE
  a_confirm_state: assert property (@(posedge clk) disable iff (!rst_n)
    qrs_confirm == (state == F1_SEEN_OPPOSITE));

endmodule
