// mmpr - modulus maxima pair recognition stage.
//
// Turns the stream of scale-3 wavelet coefficients into a 1-bit QRS
// indication. Four feature extractors work in parallel on every sample:
//   - zero_cross_det : zero crossings of the coefficients,
//   - peak_det       : local maxima/minima (zero crossings of the difference),
//   - threshold_adj  : adaptive positive/negative thresholds from past peaks,
//   - a Z^-2 delay   : the amplitude of the peak that peak_det reports now.
// mmpr_fsm1 combines them into QRS_candidate / QRS_confirm, and mmpr_fsm2
// turns those into QRS_indication with a fixed delay.
//
// Timing: one coefficient per cycle with en = 1. Feature flags are
// registered, so they and the Z^-2 amplitude refer to the same sample when
// the FSMs read them. A confirmed beat appears on qrs_indication
// DLY + 4 enables after the enable that takes in the sample completing the
// zero crossing of its pair (one for the crossing flag to reach FSM 1,
// DLY + 3 in the FSMs).
// The structure follows the description; the widths of the internal
// observation outputs are this design's.
module mmpr
  import qrs_pkg::*;
#(
  parameter int unsigned W           = COEFF_W,
  parameter int unsigned TOL         = TOL_DEF,
  parameter int unsigned RP          = RP_DEF,
  parameter int unsigned DLY         = DLY_DEF,
  parameter int unsigned M           = 8,
  parameter int unsigned BETA_X16    = 4,
  parameter int unsigned INIT_SIGNAL = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] coeff,
  output logic                qrs_indication,
  output logic signed [W-1:0] th_pos,
  output logic signed [W-1:0] th_neg,
  output fsm1_state_e         fsm1_state,
  output fsm2_state_e         fsm2_state
);

  logic signed [W-1:0] z1, z2;   // Z^-2 delay line
  zc_code_e            zc_code_unused;
  logic                zc;
  peak_e               peak;
  logic                qrs_candidate, qrs_confirm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= '0;
      z2 <= '0;
    end else if (en) begin
      z1 <= coeff;
      z2 <= z1;
    end
  end

  zero_cross_det #(.W(W)) u_zc (
    .clk(clk), .rst_n(rst_n), .en(en), .x(coeff),
    .code(zc_code_unused), .zc(zc)
  );

  peak_det #(.W(W)) u_peak (
    .clk(clk), .rst_n(rst_n), .en(en), .x(coeff), .peak(peak)
  );

  threshold_adj #(.W(W), .M(M), .BETA_X16(BETA_X16), .INIT_SIGNAL(INIT_SIGNAL)) u_th (
    .clk(clk), .rst_n(rst_n), .en(en), .peak(peak), .peak_val(z2),
    .th_pos(th_pos), .th_neg(th_neg)
  );

  mmpr_fsm1 #(.W(W), .TOL(TOL), .RP(RP)) u_fsm1 (
    .clk(clk), .rst_n(rst_n), .en(en), .peak(peak), .peak_val(z2), .zc(zc),
    .th_pos(th_pos), .th_neg(th_neg),
    .qrs_candidate(qrs_candidate), .qrs_confirm(qrs_confirm), .state(fsm1_state)
  );

  mmpr_fsm2 #(.DLY(DLY)) u_fsm2 (
    .clk(clk), .rst_n(rst_n), .en(en),
    .qrs_candidate(qrs_candidate), .qrs_confirm(qrs_confirm),
    .qrs_indication(qrs_indication), .state(fsm2_state)
  );

endmodule
