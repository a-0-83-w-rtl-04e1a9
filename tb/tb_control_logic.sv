// tb_control_logic - self-checking test of the pin synchronisers and the
// ADC request divider. Checks that run and mode follow the pins exactly two
// clocks late, that adc_start is a one-clock pulse every ADC_DIV clocks
// while run is high (first one ADC_DIV clocks after run rises), and that
// there is none while run is low.
module tb_control_logic;
  import qrs_pkg::*;
  localparam int ADC_DIV = 64;
  logic clk = 0, rst_n = 0;
  logic enable_pin = 0;
  logic [1:0] mode_pin = 2'd1;
  logic run;
  tx_mode_e mode;
  logic adc_start;
  int checks = 0, failures = 0;
  logic en_h[$];
  logic [1:0] mode_h[$];
  int since_run = 0, n_start = 0;

  control_logic #(.ADC_DIV(ADC_DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_h = '{0, 0};
    mode_h = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      bit exp_start;
      @(negedge clk);
      // pins seen two edges ago
      checks++;
      if (k >= 2 && (run != en_h[0] || mode != tx_mode_e'(mode_h[0]))) begin
        failures++;
        if (failures < 10) $display("k=%0d run=%0b mode=%0d exp %0b %0d", k, run, mode, en_h[0], mode_h[0]);
      end
      // the divider counts edges with run high; expected pulse on the ADC_DIV-th
      exp_start = run && (since_run % ADC_DIV == 0) && since_run > 0;
      checks++;
      if (adc_start != exp_start) begin
        failures++;
        if (failures < 10) $display("k=%0d adc_start=%0b exp %0b (since %0d)", k, adc_start, exp_start, since_run);
      end
      if (adc_start) n_start++;
      // update history with the values the coming edge will see
      if (k % 3000 == 100) enable_pin = 1;
      if (k % 3000 == 2500) enable_pin = 0;
      if (k % 777 == 0) mode_pin = 2'($urandom);
      since_run = run ? since_run + 1 : 0;
      en_h.push_back(enable_pin);
      mode_h.push_back(mode_pin);
      void'(en_h.pop_front());
      void'(mode_h.pop_front());
    end
    checks++;
    if (n_start < 200) failures++;
    $display("adc_start pulses: %0d", n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
