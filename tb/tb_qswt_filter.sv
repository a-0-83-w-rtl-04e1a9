// tb_qswt_filter - self-checking test of the scale-3 wavelet filter.
// The reference builds the equivalent 14-tap impulse response from its
// three a trous stages (taps 1,3,3,1; the same with a zero between taps;
// +1/-1 four samples apart), convolves the input history with it and
// floors the result divided by 32. Inputs are random full-range samples,
// bursts of extreme values and gaps in the enable; w must match after
// every enabled sample and hold while en = 0.
module tb_qswt_filter;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] x = '0;
  logic signed [13:0] w;
  int checks = 0, failures = 0;
  int h[14];
  int hist[$];   // hist[0] = newest sample
  int expw = 0;

  qswt_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div32(int v);
    return (v >= 0) ? v / 32 : -((-v + 31) / 32);
  endfunction

  initial begin
    int a[4] = '{1, 3, 3, 1};
    int b[7] = '{1, 0, 3, 0, 3, 0, 1};
    int ab[10];
    foreach (ab[i]) ab[i] = 0;
    foreach (a[i]) foreach (b[j]) ab[i+j] += a[i] * b[j];
    foreach (h[i]) h[i] = 0;
    foreach (ab[i]) begin
      h[i]   += ab[i];
      h[i+4] -= ab[i];
    end
    for (int i = 0; i < 14; i++) hist.push_back(0);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(w) != expw) begin
        failures++;
        if (failures < 10) $display("k=%0d w=%0d exp %0d", k, w, expw);
      end
      en = ($urandom_range(0, 4) != 0);
      if (k >= 3000 && k < 3400) x = ((k / 7) % 2 == 0) ? 12'sd2047 : -12'sd2048;
      else if (k % 500 < 20) x = 12'sd0;
      else x = 12'($urandom);
      if (en) begin
        int acc;
        hist.push_front(int'(x));
        void'(hist.pop_back());
        acc = 0;
        for (int i = 0; i < 14; i++) acc += h[i] * hist[i];
        expw = floor_div32(acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
