// tb_peak_det - self-checking test of the peak (zero-derivative) detector.
// A random walk with plateaus is fed in; the reference forms the first
// difference of the enabled samples and reports a maximum when it goes
// from >= 0 to < 0 and a minimum when it goes from <= 0 to > 0, one enable
// after the sample that reveals it. It also checks that the reported peak
// is a true local extremum of the samples around it.
module tb_peak_det;
  import qrs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] x = '0;
  peak_e peak;
  int checks = 0, failures = 0;
  int xs[$];          // enabled samples, xs[0] = newest
  int exp_pk = 0;
  int n_max = 0, n_min = 0;
  int v = 0;

  peak_det #(.W(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(peak) != exp_pk) begin
        failures++;
        if (failures < 10) $display("k=%0d peak=%0d exp %0d", k, peak, exp_pk);
      end
      en = ($urandom_range(0, 3) != 0);
      if (k > 4000 && k < 4100) v = (k % 2) ? 8191 : -8192;   // full-scale swings
      else if ($urandom_range(0, 3) != 0) v = v + int'($urandom_range(0, 400)) - 200;
      if (v > 8191) v = 8191;
      if (v < -8192) v = -8192;
      x = 14'(v);
      if (en) begin
        int d0, d1;
        xs.push_front(v);
        void'(xs.pop_back());
        d1 = xs[0] - xs[1];   // newest difference
        d0 = xs[1] - xs[2];   // previous difference
        exp_pk = (d0 <= 0 && d1 > 0) ? int'(PK_MIN) : (d0 >= 0 && d1 < 0) ? int'(PK_MAX) : int'(PK_NONE);
        // the peak sample xs[1] must be an extremum of its neighbours
        if (exp_pk == int'(PK_MAX)) begin
          n_max++;
          checks++;
          if (!(xs[1] >= xs[2] && xs[1] > xs[0])) failures++;
        end
        if (exp_pk == int'(PK_MIN)) begin
          n_min++;
          checks++;
          if (!(xs[1] <= xs[2] && xs[1] < xs[0])) failures++;
        end
      end
    end
    checks++;
    if (n_max < 100 || n_min < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
