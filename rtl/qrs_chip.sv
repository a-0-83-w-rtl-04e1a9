// qrs_chip - wireless ECG acquisition chip: QRS detection with radio output.
//
// Data path: the off-chip-facing SAR ADC is asked for a conversion every
// ADC_DIV system clocks (adc_start); its 10-bit results (adc_data/adc_done)
// enter the QRS detection processor, which sums four of them into one
// 12-bit sample (300 Sa/s with a 76.8 kHz clock), computes the scale-3
// quadratic spline wavelet coefficient and recognises modulus maxima pairs
// to mark each QRS complex. The wireless controller packs, according to
// the Mode pins, the QRS results (mode 1), the raw samples (mode 2) or both
// (mode 3) into 12-byte packets and writes them to a CC2500 radio over SPI,
// after configuring the radio once following reset (about 410 clocks, during
// which the chip should not yet be enabled or its first samples are not
// sent).
// control_logic synchronises the Enable and Mode pins and generates the
// ADC conversion requests.
//
// Everything runs from one clock (clk, 76.8 kHz in the intended system)
// with an active-low asynchronous reset; the 300 Hz processor clock is a
// clock enable. qrs_indication / sample_strobe are test outputs that show
// the processor result for each sample (sample_strobe is high for one
// clock per sample, qrs_indication is valid with it).
// The partitioning follows the description's block diagram; the single
// clock with enables and the test outputs are this design's.
module qrs_chip
  import qrs_pkg::*;
#(
  parameter int unsigned ADC_DIV     = 64,
  parameter int unsigned TOL         = TOL_DEF,
  parameter int unsigned RP          = RP_DEF,
  parameter int unsigned DLY         = DLY_DEF,
  parameter int unsigned BETA_X16    = 4,
  parameter int unsigned INIT_SIGNAL = 1024,
  parameter int unsigned PKT_BYTES   = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [1:0]       mode,
  output logic             adc_start,
  input  logic [ADC_W-1:0] adc_data,
  input  logic             adc_done,
  output logic             qrs_indication,
  output logic             sample_strobe,
  output logic             spi_csn,
  output logic             spi_sclk,
  output logic             spi_mosi,
  input  logic             spi_miso
);

  logic        run;
  tx_mode_e    tx_mode;
  sample_t     sample;
  coeff_t      coeff_unused, th_pos_unused, th_neg_unused;
  fsm1_state_e fsm1_unused;
  fsm2_state_e fsm2_unused;
  logic        pkt_sent_unused;

  control_logic #(.ADC_DIV(ADC_DIV)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .enable_pin(enable), .mode_pin(mode),
    .run(run), .mode(tx_mode), .adc_start(adc_start)
  );

  qrs_processor #(.TOL(TOL), .RP(RP), .DLY(DLY),
                  .BETA_X16(BETA_X16), .INIT_SIGNAL(INIT_SIGNAL)) u_proc (
    .clk(clk), .rst_n(rst_n), .run(run),
    .adc_valid(adc_done), .adc_code(adc_data),
    .sample_valid(sample_strobe), .sample(sample), .coeff(coeff_unused),
    .qrs_indication(qrs_indication),
    .th_pos(th_pos_unused), .th_neg(th_neg_unused),
    .fsm1_state(fsm1_unused), .fsm2_state(fsm2_unused)
  );

  wireless_ctrl #(.PKT_BYTES(PKT_BYTES), .SCLK_DIV(2)) u_radio (
    .clk(clk), .rst_n(rst_n), .run(run), .mode(tx_mode),
    .sample_valid(sample_strobe), .sample(sample), .qrs(qrs_indication),
    .spi_csn(spi_csn), .spi_sclk(spi_sclk), .spi_mosi(spi_mosi), .spi_miso(spi_miso),
    .pkt_sent(pkt_sent_unused)
  );

endmodule
