// ecg_adc_model - behavioural model of the ECG source and the 10-bit SAR ADC
// (testbench only).
//
// A synthetic ECG is defined at 300 samples per second by a schedule of
// events (SCENARIO selects one). Each event starts at a sample index and
// adds a shape to the baseline:
//   EV_BEAT   normal beat: P wave, Q dip, triangular R wave of height amp,
//             S dip and a T wave (R peak at the event index)
//   EV_SLOPE  fast rise of amp followed by a further slow rise over 45
//             samples and a slow return (coefficients stay positive long
//             after their peak: time-out in Seen_peak)
//   EV_STEP   fast rise of amp followed by a slow fall (a peak and a zero
//             crossing but no opposite peak: rejected candidate)
//   EV_SHARP  a burst of alternating samples whose first large wavelet
//             peak is followed at once by a negative coefficient (case 2)
//   EV_WIDE   wide ventricular-like beat: no P wave, R wave about 2.5 times
//             wider than normal, large opposite-sign T wave
// A negative amp gives an inverted complex. On top come a small
// deterministic noise and, in scenarios 0 and 2, a slow baseline wander.
// Scenarios: 0 processor test, 1 chip test, 2 rhythm workload (changing
// rate from 40 to 180 beats per minute, alternating amplitude, inverted
// beats and ventricular bigeminy; R peaks in ev_n).
// Each adc_start request is answered CONV_CLKS clocks later by adc_done and
// a 10-bit offset-binary code. Conversion k belongs to sample k/4; the four
// codes of a sample are floor((v + 2048 + i)/4), i = 0..3, so their sum is
// exactly v + 2048 and the averager reproduces v.
module ecg_adc_model #(
  parameter int SCENARIO  = 0,
  parameter int CONV_CLKS = 11
) (
  input  logic       clk,
  input  logic       adc_start,
  output logic [9:0] adc_data,
  output logic       adc_done,
  output int         sample_idx
);

  localparam int EV_BEAT = 1, EV_SLOPE = 2, EV_STEP = 3, EV_SHARP = 4, EV_WIDE = 5;

  int ev_n[$], ev_kind[$], ev_amp[$];
  int conv_count = 0;
  int busy = 0;

  task automatic add_ev(int n, int kind, int amp);
    ev_n.push_back(n);
    ev_kind.push_back(kind);
    ev_amp.push_back(amp);
  endtask

  // schedule
  initial begin
    if (SCENARIO == 0) begin
      // processor test: 12 normal beats, then irregular beats
      for (int k = 0; k < 12; k++) add_ev(100 + 240 * k + ((k * 37) % 23) - 11, EV_BEAT, 900 + (k % 3) * 100);
      add_ev(3100, EV_BEAT, 700);
      add_ev(3250, EV_BEAT, 1100);   // short RR
      add_ev(3600, EV_BEAT, 800);
    end else if (SCENARIO == 2) begin
      // rhythm workload, about 52 s
      int n;
      n = 150;
      for (int k = 0; k < 10; k++) begin add_ev(n, EV_BEAT, 1000); n += 240 + ((k * 37) % 13) - 6; end  // 75 bpm
      for (int k = 0; k < 16; k++) begin add_ev(n, EV_BEAT, 900); n += 100; end                         // 180 bpm
      for (int k = 0; k < 6; k++)  begin add_ev(n, EV_BEAT, 1000); n += 450; end                        // 40 bpm
      for (int k = 0; k < 12; k++) begin add_ev(n, EV_BEAT, (k % 2 == 1) ? 450 : 1200); n += 200; end        // alternans
      for (int k = 0; k < 8; k++)  begin add_ev(n, EV_BEAT, -900); n += 240; end                        // inverted
      for (int k = 0; k < 6; k++)  begin                                                                // bigeminy
        add_ev(n, EV_BEAT, 1000); n += 160;
        add_ev(n, EV_WIDE, 1300); n += 330;
      end
      for (int k = 0; k < 8; k++)  begin add_ev(n, EV_BEAT, 700 + 60 * k); n += 260 - 15 * k; end       // speeding up
    end else begin
      // chip test
      for (int k = 0; k < 10; k++) add_ev(150 + 240 * k + ((k * 37) % 23) - 11, EV_BEAT, 1000);
      add_ev(2600, EV_SLOPE, 600);
      add_ev(3100, EV_STEP, 600);
      for (int k = 0; k < 16; k++) add_ev(3500 + 240 * k + ((k * 29) % 17) - 8, EV_BEAT, 330);
      add_ev(7400, EV_SHARP, 1);
      for (int k = 0; k < 4; k++) add_ev(7700 + 240 * k, EV_BEAT, 330);
    end
  end

  function automatic real bump(real t, real width);   // raised cosine, 0..1
    if (t <= -width / 2 || t >= width / 2) return 0.0;
    return 0.5 * (1.0 + $cos(2.0 * 3.14159265358979 * t / width));
  endfunction

  function automatic real triangle(real t, real half);      // triangle, 0..1
    if (t <= -half || t >= half) return 0.0;
    return (t < 0) ? 1.0 + t / half : 1.0 - t / half;
  endfunction

  function automatic int shape(int kind, int amp, int t);
    real v;
    int sharp[14] = '{-650, 1600, -1200, 1300, -1900, -2000, -1500, -250, 1750, -2000, 1750, -650, 700, 250};
    v = 0.0;
    case (kind)
      EV_BEAT: begin
        v += 0.10 * amp * bump(real'(t + 50), 30.0);          // P
        v -= 0.10 * amp * triangle(real'(t + 5), 2.0);             // Q
        v += amp * triangle(real'(t), 4.0);                        // R
        v -= 0.25 * amp * triangle(real'(t - 5), 2.5);             // S
        v += 0.25 * amp * bump(real'(t - 75), 60.0);          // T
      end
      EV_WIDE: begin
        v -= 0.15 * amp * triangle(real'(t + 12), 4.0);            // Q
        v += amp * triangle(real'(t), 10.0);                       // R
        v -= 0.40 * amp * bump(real'(t - 60), 70.0);          // T
      end
      EV_SLOPE: begin
        if (t >= 0 && t < 45) v = amp + 10.0 * t;
        else if (t >= 45 && t < 45 + 210) v = (amp + 450.0) * (1.0 - real'(t - 45) / 210.0);
      end
      EV_STEP: begin
        if (t >= 0 && t < 150) v = amp * (1.0 - real'(t) / 150.0);
      end
      EV_SHARP: begin
        if (t >= 0 && t < 14) v = real'(sharp[t]);
      end
      default: ;
    endcase
    return int'(v);
  endfunction

  // ECG value of sample n, 12-bit two's complement range
  function automatic int ecg(int n);
    real base;
    int v;
    bit sharp_near;
    sharp_near = 0;
    foreach (ev_n[i]) if (ev_kind[i] == EV_SHARP && n > ev_n[i] - 300 && n < ev_n[i] + 100) sharp_near = 1;
    // baseline wander in scenarios 0 and 2; no noise close to the sharp
    // burst, which needs a quiet lead-in
    base = (SCENARIO == 0) ? 120.0 * $sin(2.0 * 3.14159265358979 * real'(n) / 1500.0) :
           (SCENARIO == 2) ? 300.0 * $sin(2.0 * 3.14159265358979 * real'(n) / 1200.0) : 0.0;
    v = int'(base);
    if (!sharp_near) v += ((n * 7919) % 9) - 4;   // noise, -4..4
    foreach (ev_n[i]) if (n - ev_n[i] > -80 && n - ev_n[i] < 300) v += shape(ev_kind[i], ev_amp[i], n - ev_n[i]);
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return v;
  endfunction

  assign sample_idx = conv_count / 4;

  initial begin
    adc_done = 0;
    adc_data = '0;
  end

  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) begin
        adc_data   <= 10'((ecg(conv_count / 4) + 2048 + (conv_count % 4)) / 4);
        adc_done   <= 1'b1;
        conv_count <= conv_count + 1;
      end
    end else if (adc_start) begin
      busy <= CONV_CLKS;
    end
  end

endmodule
