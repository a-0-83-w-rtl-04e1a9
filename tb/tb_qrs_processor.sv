// tb_qrs_processor - end-to-end test of the QRS detection processor.
// A behavioural ADC delivers four codes per sample of a synthetic ECG with
// baseline wander (15 beats, one with a short RR interval). Checks:
//   - every processed sample equals the ECG value (averager path),
//   - every coefficient equals an independent scale-3 wavelet filter of
//     those samples,
//   - every beat gets exactly one QRS indication, between DLY + 4 and
//     DLY + 16 samples after its R peak, and there are no other indications,
//   - one processor step per four conversions (300 Sa/s for 1200 conv/s).
module tb_qrs_processor;
  import qrs_pkg::*;
  localparam int DLY = 21;
  localparam int NSAMP = 4000;
  logic clk = 0, rst_n = 0, run = 0;
  logic adc_start = 0;
  logic [9:0] adc_data;
  logic adc_done;
  int sample_idx;
  logic sample_valid;
  sample_t sample;
  coeff_t coeff, th_pos, th_neg;
  logic qrs_indication;
  fsm1_state_e fsm1_state;
  fsm2_state_e fsm2_state;
  int checks = 0, failures = 0;
  int m = 0;               // processed samples
  int hist[$];
  int h[14] = '{1, 3, 6, 10, 11, 9, 4, -4, -9, -11, -10, -6, -3, -1};
  int ind_at[$];
  int conversions = 0;

  ecg_adc_model #(.SCENARIO(0)) u_adc (
    .clk(clk), .adc_start(adc_start), .adc_data(adc_data), .adc_done(adc_done), .sample_idx(sample_idx)
  );

  qrs_processor dut (
    .clk(clk), .rst_n(rst_n), .run(run), .adc_valid(adc_done), .adc_code(adc_data),
    .sample_valid(sample_valid), .sample(sample), .coeff(coeff), .qrs_indication(qrs_indication),
    .th_pos(th_pos), .th_neg(th_neg), .fsm1_state(fsm1_state), .fsm2_state(fsm2_state)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 80 + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // conversion requests every 16 clocks (time is compressed; the
  // processor only sees strobes)
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    run = 1;
    forever begin
      repeat (15) @(posedge clk);
      adc_start <= 1'b1;
      @(posedge clk);
      adc_start <= 1'b0;
    end
  end

  always @(posedge clk) if (adc_done) conversions++;

  function automatic int floor_div32(int v);
    return (v >= 0) ? v / 32 : -((-v + 31) / 32);
  endfunction

  initial begin
    for (int i = 0; i < 14; i++) hist.push_back(0);
    while (m < NSAMP) begin
      @(negedge clk);
      if (sample_valid) begin
        int e, acc;
        e = u_adc.ecg(m);
        checks++;
        if (int'(sample) != e) begin
          failures++;
          if (failures < 10) $display("sample %0d = %0d, ECG %0d", m, sample, e);
        end
        hist.push_front(e);
        void'(hist.pop_back());
        acc = 0;
        for (int i = 0; i < 14; i++) acc += h[i] * hist[i];
        checks++;
        if (int'(coeff) != floor_div32(acc)) begin
          failures++;
          if (failures < 10) $display("coeff %0d = %0d, expected %0d", m, coeff, floor_div32(acc));
        end
        if (qrs_indication) ind_at.push_back(m);
        m++;
      end
    end
    // rate: four conversions per processed sample
    checks++;
    if (conversions / 4 != m && conversions / 4 != m + 1) begin
      failures++;
      $display("conversions %0d for %0d samples", conversions, m);
    end
    // match beats and indications
    begin
      int used[$];
      int nbeats;
      nbeats = 0;
      foreach (ind_at[j]) used.push_back(0);
      foreach (u_adc.ev_n[i]) begin
        int found, r;
        r = u_adc.ev_n[i];
        if (r + DLY + 16 >= NSAMP) continue;
        nbeats++;
        found = 0;
        foreach (ind_at[j]) begin
          if (ind_at[j] - r >= DLY + 4 && ind_at[j] - r <= DLY + 16) begin
            found++;
            used[j] = 1;
            $display("beat at %0d indicated at %0d (+%0d)", r, ind_at[j], ind_at[j] - r);
          end
        end
        checks++;
        if (found != 1) begin
          failures++;
          $display("beat at %0d: %0d indications", r, found);
        end
      end
      foreach (used[j]) begin
        checks++;
        if (used[j] == 0) begin
          failures++;
          $display("false indication at %0d", ind_at[j]);
        end
      end
      checks++;
      if (nbeats < 14) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
