// tb_zero_cross_det - self-checking test of the zero-crossing detector.
// Drives small random values (so that zeros and sign changes are frequent)
// with random enable gaps, and compares code and zc after every clock with
// the crossing rule evaluated on the last two enabled samples.
module tb_zero_cross_det;
  import qrs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] x = '0;
  zc_code_e code;
  logic zc;
  int checks = 0, failures = 0;
  int prev = 0;
  int exp_code = 0, exp_zc = 0;
  int n_rise = 0, n_fall = 0, n_zero = 0;

  zero_cross_det #(.W(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(code) != exp_code || int'(zc) != exp_zc) begin
        failures++;
        if (failures < 10) $display("k=%0d code=%0d zc=%0b exp %0d %0d", k, code, zc, exp_code, exp_zc);
      end
      en = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 5))
        0: x = 14'sd0;
        1: x = 14'sd8191;
        2: x = -14'sd8192;
        default: x = 14'(int'($urandom_range(0, 6)) - 3);
      endcase
      if (en) begin
        int cur;
        cur = int'(x);
        exp_code = (prev <= 0 && cur > 0) ? 1 : (prev >= 0 && cur < 0) ? 2 : 0;
        exp_zc = (exp_code != 0 || cur == 0) ? 1 : 0;
        if (exp_code == 1) n_rise++;
        if (exp_code == 2) n_fall++;
        if (cur == 0) n_zero++;
        prev = cur;
      end
    end
    checks++;
    if (n_rise < 100 || n_fall < 100 || n_zero < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
