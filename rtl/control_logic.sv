// control_logic - pin synchronisers and clock enables of the chip.
//
// The Enable and Mode pins are asynchronous to the system clock and pass
// through two-flop synchronisers. While the synchronised enable (run) is
// high, a divide-by-ADC_DIV counter issues a one-clock adc_start request;
// with the 76.8 kHz system clock and ADC_DIV = 64 that is 1200 conversions
// per second, four per 300 Hz processor sample. The processor itself is
// stepped by the averaged-sample strobe, and the wireless controller uses
// run and mode.
//
// Timing: run and mode follow the pins two clocks late. The first
// adc_start comes ADC_DIV clocks after run rises; the counter restarts
// whenever run is low. The role of this block (clock and enable
// distribution from the Enable, Mode and Clk pins) follows the description;
// its contents are this design's.
module control_logic
  import qrs_pkg::*;
#(
  parameter int unsigned ADC_DIV = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable_pin,
  input  logic [1:0] mode_pin,
  output logic     run,
  output tx_mode_e mode,
  output logic     adc_start
);

  localparam int unsigned DIV_W = $clog2(ADC_DIV);

  logic       en_meta;
  logic [1:0] mode_meta;
  logic [DIV_W-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_meta   <= 1'b0;
      run       <= 1'b0;
      mode_meta <= '0;
      mode      <= MODE_OFF;
    end else begin
      en_meta   <= enable_pin;
      run       <= en_meta;
      mode_meta <= mode_pin;
      mode      <= tx_mode_e'(mode_meta);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      adc_start <= 1'b0;
    end else if (!run) begin
      div       <= '0;
      adc_start <= 1'b0;
    end else begin
      adc_start <= (div == DIV_W'(ADC_DIV - 1));
      div       <= (div == DIV_W'(ADC_DIV - 1)) ? '0 : div + 1'b1;
    end
  end

endmodule
