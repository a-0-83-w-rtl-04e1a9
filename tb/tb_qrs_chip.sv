// tb_qrs_chip - end-to-end test of the chip at its default parameters.
//
// A behavioural ECG source and SAR ADC feed the chip; a CC2500 model
// receives its SPI traffic. About 29 s of signal (8800 samples at 300 Sa/s,
// 256 clocks per sample) are run: ten large beats, a slow slope artefact,
// a step artefact, sixteen small beats that pull the thresholds down, a
// sharp biphasic burst and four more beats. The transmission mode is 1
// for the first 3000 samples, 3 until sample 6000, then 2.
// Checks:
//   - one processor sample every 256 clocks (1200 conversions per second),
//   - every beat and the burst get exactly one QRS indication, between
//     DLY + 4 and DLY + 30 samples after the event; the artefacts and
//     everything else get none,
//   - every radio packet decodes, by its control bits, into the samples
//     and QRS results that the chip produced, in order, with no gap,
//   - each mechanism happened at least once: case 1 and case 2 pairs,
//     TOL time-out in Seen_peak and in Seen_zero, refractory blanking,
//     a rejected candidate, signal and noise peaks on both threshold sides,
//     packets of all three modes, a wait for the radio's ready signal,
//   - the radio was reset once and configured (10 register writes, 12-byte
//     packets) before the chip was enabled.
module tb_qrs_chip;
  import qrs_pkg::*;
  localparam int DLY = 21;
  localparam int NSAMP = 8800;
  logic clk = 0, rst_n = 1;
  logic enable = 0;
  logic [1:0] mode = 2'd1;
  logic adc_start;
  logic [9:0] adc_data;
  logic adc_done;
  int sample_idx;
  logic qrs_indication, sample_strobe;
  logic spi_csn, spi_sclk, spi_mosi, spi_miso;
  int checks = 0, failures = 0;
  int m = 0;
  int rec_s[$], rec_q[$];
  int ind_at[$];
  int last_strobe = -1, cyc = 0, bad_interval = 0;

  // mechanism counters
  int c_case1 = 0, c_case2 = 0, c_tol_peak = 0, c_tol_zero = 0, c_rp = 0, c_reject = 0;
  int c_sig_pos = 0, c_noise_pos = 0, c_sig_neg = 0, c_noise_neg = 0;

  qrs_chip dut (.*);
  ecg_adc_model #(.SCENARIO(1)) u_adc (
    .clk(clk), .adc_start(adc_start), .adc_data(adc_data), .adc_done(adc_done), .sample_idx(sample_idx)
  );
  cc2500_model u_cc (.clk(clk), .csn(spi_csn), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso));

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 256 + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors (sampled at enabled steps of the recognition stage)
  always @(posedge clk) if (rst_n && dut.u_proc.step) begin
    automatic fsm1_state_e s1 = dut.u_proc.u_mmpr.u_fsm1.state;
    automatic logic opp = dut.u_proc.u_mmpr.u_fsm1.opposite;
    automatic logic zc = dut.u_proc.u_mmpr.u_fsm1.zc;
    automatic int cnt = int'(dut.u_proc.u_mmpr.u_fsm1.counter);
    if (s1 == F1_SEEN_ZERO && opp) c_case1++;
    if (s1 == F1_SEEN_PEAK && opp) c_case2++;
    if (s1 == F1_SEEN_PEAK && !opp && !zc && cnt >= 21) c_tol_peak++;
    if (s1 == F1_SEEN_ZERO && !opp && cnt >= 21) c_tol_zero++;
    if (s1 == F1_SEEN_OPPOSITE && cnt >= 25) c_rp++;
    if (dut.u_proc.u_mmpr.u_fsm2.state == F2_SEEN_CONFIRM && !dut.u_proc.u_mmpr.u_fsm2.qrs_confirm) c_reject++;
    if (dut.u_proc.u_mmpr.u_th.upd) begin
      if (dut.u_proc.u_mmpr.u_th.side == 1'b0) begin
        if (dut.u_proc.u_mmpr.u_th.is_signal) c_sig_pos++; else c_noise_pos++;
      end else begin
        if (dut.u_proc.u_mmpr.u_th.is_signal) c_sig_neg++; else c_noise_neg++;
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && sample_strobe) begin
      if (last_strobe >= 0 && cyc - last_strobe != 256) bad_interval++;
      last_strobe = cyc;
    end
  end

  task automatic check_packets();
    int p, nbytes;
    int seen_mode[4] = '{0, 0, 0, 0};
    p = 0;
    nbytes = u_cc.tx_bytes.size();
    for (int b = 0; b + 12 <= nbytes; b += 12) begin
      int md;
      md = u_cc.tx_bytes[b] >> 6;
      seen_mode[md]++;
      if (md == 1) begin
        for (int i = 0; i < 12; i++) begin
          int by;
          by = u_cc.tx_bytes[b + i];
          checks++;
          if ((by >> 5) != 3) failures++;
          for (int j = 4; j >= 0; j--) begin
            checks++;
            if (((by >> j) & 1) != rec_q[p]) begin failures++; $display("packet qrs bit of sample %0d", p); end
            p++;
          end
        end
      end else if (md == 2 || md == 3) begin
        for (int i = 0; i < 12; i += 2) begin
          int hi, lo;
          hi = u_cc.tx_bytes[b + i];
          lo = u_cc.tx_bytes[b + i + 1];
          checks++;
          if ((hi >> 5) != md * 2 + 1 || ((((hi & 'hF) << 8) | lo) != rec_s[p]) ||
              (((hi >> 4) & 1) != ((md == 3) ? rec_q[p] : 0))) begin
            failures++;
            $display("packet word of sample %0d: %02h %02h", p, hi, lo);
          end
          p++;
        end
      end else begin
        checks++;
        failures++;
        $display("packet with mode %0d", md);
      end
    end
    $display("packets: mode1 %0d, mode2 %0d, mode3 %0d; %0d of %0d samples carried; strobes %0d, bad frames %0d",
             seen_mode[1], seen_mode[2], seen_mode[3], p, rec_s.size(), u_cc.packets, u_cc.bad_frames);
    checks++;
    if (seen_mode[1] == 0 || seen_mode[2] == 0 || seen_mode[3] == 0) begin failures++; $display("a mode never sent"); end
    checks++;
    if (p + 61 < rec_s.size()) begin failures++; $display("samples missing from the radio stream"); end
    checks++;
    if (u_cc.bad_frames != 0 || u_cc.packets != nbytes / 12 || nbytes % 12 != 0) failures++;
    checks++;
    if (u_cc.rdy_waits == 0) begin failures++; $display("radio ready wait never happened"); end
    checks++;
    if (u_cc.sres_count != 1 || u_cc.cfg_writes != 10 || u_cc.regs['h06] != 12) begin
      failures++; $display("radio configuration: sres %0d, writes %0d", u_cc.sres_count, u_cc.cfg_writes);
    end
  endtask

  initial begin
    #1 rst_n = 0;   // asynchronous reset before the first clock edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dut.u_radio.cfg_done);
    @(negedge clk) enable = 1;
    while (m < NSAMP) begin
      @(negedge clk);
      if (rst_n && sample_strobe) begin
        rec_s.push_back(u_adc.ecg(m) & 'hFFF);
        rec_q.push_back(int'(qrs_indication));
        if (qrs_indication) ind_at.push_back(m);
        m++;
        if (m == 3000) mode = 2'd3;
        if (m == 6000) mode = 2'd2;
      end
    end
    repeat (600) @(negedge clk);

    checks++;
    if (bad_interval != 0) begin failures++; $display("%0d sample intervals differ from 256 clocks", bad_interval); end

    // detections
    begin
      int used[$];
      foreach (ind_at[j]) used.push_back(0);
      foreach (u_adc.ev_n[i]) begin
        int found, r, k;
        bit want;
        r = u_adc.ev_n[i];
        k = u_adc.ev_kind[i];
        if (r + DLY + 30 >= NSAMP) continue;
        want = (k == u_adc.EV_BEAT || k == u_adc.EV_SHARP);
        found = 0;
        foreach (ind_at[j]) begin
          if (ind_at[j] - r >= DLY + 4 && ind_at[j] - r <= DLY + 30) begin
            found++;
            used[j] = 1;
          end
        end
        checks++;
        if (found != (want ? 1 : 0)) begin
          failures++;
          $display("event kind %0d at %0d: %0d indications", k, r, found);
        end
      end
      foreach (used[j]) begin
        checks++;
        if (used[j] == 0) begin failures++; $display("false indication at %0d", ind_at[j]); end
      end
    end

    check_packets();

    $display("case1=%0d case2=%0d tol_peak=%0d tol_zero=%0d refractory=%0d rejected=%0d",
             c_case1, c_case2, c_tol_peak, c_tol_zero, c_rp, c_reject);
    $display("threshold updates: pos signal %0d noise %0d, neg signal %0d noise %0d",
             c_sig_pos, c_noise_pos, c_sig_neg, c_noise_neg);
    $display("indications: %0d", ind_at.size());
    checks++;
    if (c_case1 == 0 || c_case2 == 0 || c_tol_peak == 0 || c_tol_zero == 0 || c_rp == 0 || c_reject == 0 ||
        c_sig_pos == 0 || c_noise_pos == 0 || c_sig_neg == 0 || c_noise_neg == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
