// tb_qrs_rhythm - detection workload for the QRS detection processor.
//
// Streams about 52 s of synthetic ECG (ecg_adc_model scenario 2) through
// the processor at its default parameters: a rhythm that changes from 75
// to 180 to 40 beats per minute, beat-to-beat amplitude alternation
// (1200 / 450), inverted complexes, ventricular bigeminy with wide beats
// and early coupling, and a run that speeds up, all on a 300-count
// baseline wander with small noise. The ADC is asked for a conversion every
// 16 clocks (time is compressed; the processor only sees its strobes).
//
// Each R peak must get exactly one QRS indication between DLY + 4 and
// DLY + 30 samples after it, and there must be no other indications. The
// test prints sensitivity Se = TP / (TP + FN) and positive predictivity
// Pr = TP / (TP + FP), the measures used for detectors on annotated
// databases, plus the smallest and largest latency, and fails unless both
// are 100 % on this record. It also checks the sample rate (four
// conversions per sample).
module tb_qrs_rhythm;
  import qrs_pkg::*;
  localparam int DLY = 21;
  logic clk = 0, rst_n = 1, run = 0;
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
  int nsamp;
  int ind_at[$];
  int conversions = 0;

  ecg_adc_model #(.SCENARIO(2)) u_adc (
    .clk(clk), .adc_start(adc_start), .adc_data(adc_data), .adc_done(adc_done), .sample_idx(sample_idx)
  );

  qrs_processor dut (
    .clk(clk), .rst_n(rst_n), .run(run), .adc_valid(adc_done), .adc_code(adc_data),
    .sample_valid(sample_valid), .sample(sample), .coeff(coeff), .qrs_indication(qrs_indication),
    .th_pos(th_pos), .th_neg(th_neg), .fsm1_state(fsm1_state), .fsm2_state(fsm2_state)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000 * 64) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
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

  initial begin
    int tp, fn, fp, lat_min, lat_max;
    @(posedge rst_n);
    nsamp = u_adc.ev_n[u_adc.ev_n.size() - 1] + 200;
    while (m < nsamp) begin
      @(negedge clk);
      if (sample_valid) begin
        checks++;
        if (int'(sample) != u_adc.ecg(m)) begin
          failures++;
          if (failures < 10) $display("sample %0d = %0d, ECG %0d", m, sample, u_adc.ecg(m));
        end
        if (qrs_indication) ind_at.push_back(m);
        m++;
      end
    end
    checks++;
    if (conversions / 4 != m && conversions / 4 != m + 1) begin
      failures++;
      $display("conversions %0d for %0d samples", conversions, m);
    end

    // match R peaks and indications
    tp = 0; fn = 0; fp = 0;
    lat_min = 1000; lat_max = 0;
    begin
      int used[$];
      foreach (ind_at[j]) used.push_back(0);
      foreach (u_adc.ev_n[i]) begin
        int found, r;
        r = u_adc.ev_n[i];
        found = 0;
        foreach (ind_at[j]) begin
          if (ind_at[j] - r >= DLY + 4 && ind_at[j] - r <= DLY + 30) begin
            found++;
            used[j] = 1;
            if (ind_at[j] - r < lat_min) lat_min = ind_at[j] - r;
            if (ind_at[j] - r > lat_max) lat_max = ind_at[j] - r;
          end
        end
        checks++;
        if (found == 0) begin
          fn++;
          failures++;
          $display("missed beat at %0d (kind %0d, amplitude %0d)", r, u_adc.ev_kind[i], u_adc.ev_amp[i]);
        end else begin
          tp++;
          if (found > 1) begin
            failures++;
            $display("beat at %0d: %0d indications", r, found);
          end
        end
      end
      foreach (used[j]) begin
        checks++;
        if (used[j] == 0) begin
          fp++;
          failures++;
          $display("false indication at %0d", ind_at[j]);
        end
      end
    end
    $display("%0d samples (%0d s), %0d beats: TP %0d, FN %0d, FP %0d", m, m / 300, u_adc.ev_n.size(), tp, fn, fp);
    $display("Se = %0.2f %%, Pr = %0.2f %%, latency %0d..%0d samples after the R peak",
             100.0 * tp / (tp + fn), (tp + fp) > 0 ? 100.0 * tp / (tp + fp) : 0.0, lat_min, lat_max);
    checks++;
    if (tp < 70) begin failures++; $display("too few beats detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
