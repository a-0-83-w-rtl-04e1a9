// tb_threshold_adj - self-checking test of the adaptive thresholds.
// Random peaks of both kinds and signs are presented. The reference keeps,
// per side, lists of the last 8 signal and 8 noise peak magnitudes
// (starting at 1024 and 0), classifies each new peak against the current
// threshold and recomputes TH = ANPL + beta (ASPL - ANPL) with beta = 1/4
// using integer means (floor). th_pos and -th_neg must equal it after every
// clock. Signal and noise updates of both sides are counted and required.
module tb_threshold_adj;
  import qrs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  peak_e peak = PK_NONE;
  logic signed [13:0] peak_val = '0;
  logic signed [13:0] th_pos, th_neg;
  int checks = 0, failures = 0;
  int sigq[2][$], noiq[2][$];
  int th[2];
  int n_sig[2], n_noise[2];

  threshold_adj #(.W(14), .M(8), .BETA_X16(4), .INIT_SIGNAL(1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv(int a, int b);  // floor division, b > 0
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic int calc(int s);
    int ss, ns, aspl, anpl, t;
    ss = 0; ns = 0;
    foreach (sigq[s][i]) ss += sigq[s][i];
    foreach (noiq[s][i]) ns += noiq[s][i];
    aspl = ss / 8;
    anpl = ns / 8;
    t = anpl + fdiv((aspl - anpl) * 4, 16);
    if (t < 0) t = 0;
    if (t > 8191) t = 8191;
    return t;
  endfunction

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 8; i++) begin
        sigq[s].push_back(1024);
        noiq[s].push_back(0);
      end
      th[s] = calc(s);
      n_sig[s] = 0;
      n_noise[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(th_pos) != th[0] || int'(th_neg) != -th[1]) begin
        failures++;
        if (failures < 10) $display("k=%0d th=%0d/%0d exp %0d/%0d", k, th_pos, th_neg, th[0], -th[1]);
      end
      en = ($urandom_range(0, 4) != 0);
      peak = peak_e'($urandom_range(0, 2));
      // phases with large peaks and with small ones move the levels around
      if ((k / 700) % 2 == 0) peak_val = 14'(int'($urandom_range(0, 16000)) - 8000);
      else peak_val = 14'(int'($urandom_range(0, 1200)) - 600);
      if (k == 5000) peak_val = -14'sd8192;
      if (en) begin
        int s, mag;
        s = -1;
        if (peak == PK_MAX && peak_val > 0) begin s = 0; mag = int'(peak_val); end
        if (peak == PK_MIN && peak_val < 0) begin s = 1; mag = -int'(peak_val); if (mag > 8191) mag = 8191; end
        if (s >= 0) begin
          if (mag >= th[s]) begin
            sigq[s].push_front(mag); void'(sigq[s].pop_back()); n_sig[s]++;
          end else begin
            noiq[s].push_front(mag); void'(noiq[s].pop_back()); n_noise[s]++;
          end
          th[s] = calc(s);
        end
      end
    end
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (n_sig[s] < 50 || n_noise[s] < 50) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
