// qrs_processor - the QRS detection processor: Avg -> wavelet filter -> MMPR.
//
// ADC codes (10 bits, four per processor sample) are summed by ecg_avg into
// 12-bit two's complement samples; qswt_filter computes the scale-3
// quadratic spline wavelet coefficient (14 bits) of each sample; mmpr
// recognises the modulus maxima pairs and outputs a 1-bit QRS indication.
//
// Clocking: the whole processor runs from the system clock with a clock
// enable. The averager's output strobe is the processor's 300 Hz "clock":
// each strobe moves the filter and the recognition stage by one sample.
// One clock after the strobe, sample_valid is high for one clock and
// sample, coeff and qrs_indication describe the same processor step
// (coeff is the coefficient of that sample; qrs_indication refers to a beat
// whose zero crossing was about DLY + 5 samples earlier).
// Inputs are ignored while run = 0.
module qrs_processor
  import qrs_pkg::*;
#(
  parameter int unsigned TOL         = TOL_DEF,
  parameter int unsigned RP          = RP_DEF,
  parameter int unsigned DLY         = DLY_DEF,
  parameter int unsigned BETA_X16    = 4,
  parameter int unsigned INIT_SIGNAL = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               adc_valid,
  input  logic [ADC_W-1:0]   adc_code,
  output logic               sample_valid,
  output sample_t            sample,
  output coeff_t             coeff,
  output logic               qrs_indication,
  output coeff_t             th_pos,
  output coeff_t             th_neg,
  output fsm1_state_e        fsm1_state,
  output fsm2_state_e        fsm2_state
);

  logic    step;      // one processor clock
  sample_t avg_sample;

  ecg_avg #(.IN_W(ADC_W), .OSR(4), .OUT_W(SAMPLE_W)) u_avg (
    .clk(clk), .rst_n(rst_n),
    .in_valid(run && adc_valid), .in_code(adc_code),
    .out_valid(step), .out_sample(avg_sample)
  );

  qswt_filter #(.IN_W(SAMPLE_W), .OUT_W(COEFF_W)) u_qswt (
    .clk(clk), .rst_n(rst_n), .en(step), .x(avg_sample), .w(coeff)
  );

  mmpr #(.W(COEFF_W), .TOL(TOL), .RP(RP), .DLY(DLY),
         .BETA_X16(BETA_X16), .INIT_SIGNAL(INIT_SIGNAL)) u_mmpr (
    .clk(clk), .rst_n(rst_n), .en(step), .coeff(coeff),
    .qrs_indication(qrs_indication), .th_pos(th_pos), .th_neg(th_neg),
    .fsm1_state(fsm1_state), .fsm2_state(fsm2_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= step;
      if (step) sample <= avg_sample;
    end
  end

endmodule
