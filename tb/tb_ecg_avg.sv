// tb_ecg_avg - self-checking test of the oversampling averager.
// Random 10-bit codes arrive with random gaps; every fourth code the output
// must be the sum of the last four minus 2048 (two's complement), exactly
// one clock after the fourth code, and never otherwise.
module tb_ecg_avg;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [9:0] in_code = '0;
  logic out_valid;
  logic signed [11:0] out_sample;
  int checks = 0, failures = 0;
  int exp_q[$];
  int acc = 0, cnt = 0, outs = 0;
  bit expect_out = 0;  // out_valid expected after the coming edge

  ecg_avg #(.IN_W(10), .OSR(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // outputs of the previous clock edge
      checks++;
      if (out_valid !== expect_out) begin
        failures++;
        $display("valid mismatch t=%0t got %0b exp %0b", $time, out_valid, expect_out);
      end else if (out_valid) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        outs++;
        if (int'(out_sample) != e) begin
          failures++;
          $display("sample mismatch got %0d exp %0d", out_sample, e);
        end
      end
      if ($urandom_range(0, 2) != 0) begin
        in_valid = 1;
        // corner codes now and then
        case ($urandom_range(0, 9))
          0: in_code = 10'd0;
          1: in_code = 10'd1023;
          default: in_code = 10'($urandom);
        endcase
        acc += in_code;
        cnt++;
        if (cnt == 4) begin
          exp_q.push_back(acc - 2048);
          acc = 0;
          cnt = 0;
        end
      end else begin
        in_valid = 0;
      end
      expect_out = in_valid && (cnt == 0);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (outs < 500 || exp_q.size() != 0) begin
      failures++;
      $display("too few outputs %0d or left %0d", outs, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
