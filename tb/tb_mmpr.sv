// tb_mmpr - self-checking test of the modulus maxima pair recognition.
// Hand-made coefficient sequences, separated by silence, exercise each
// path of the decision rules:
//   A  positive-then-negative pair (case 1: peak, zero, opposite peak)
//   B  negative-then-positive pair (case 1, other direction)
//   C  pair whose zero crossing falls between two samples right after the
//      first peak (case 2: peak, opposite peak)
//   D  positive lobe, zero crossing, weak negative lobe (rejected candidate)
//   E  pair below the thresholds (ignored)
// A confirmed pair must give exactly one indication, DLY + 4 samples after
// the sample that reveals its zero crossing (case 1) or its second peak
// (case 2); there must be no indication anywhere else. Samples are
// presented with random gaps in the enable.
module tb_mmpr;
  import qrs_pkg::*;
  localparam int DLY = 21;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] coeff = '0;
  logic qrs_indication;
  logic signed [13:0] th_pos, th_neg;
  fsm1_state_e fsm1_state;
  fsm2_state_e fsm2_state;
  int checks = 0, failures = 0;
  int seq[$];
  int expect_at[$];
  int n_ind = 0;

  mmpr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic silence(int n);
    repeat (n) seq.push_back(0);
  endtask

  // append values; 'mark' is the offset in v of the revealing sample, -1 for none
  task automatic add(int v[], int mark);
    if (mark >= 0) expect_at.push_back(seq.size() + mark + DLY + 4);
    foreach (v[i]) seq.push_back(v[i]);
  endtask

  initial begin
    silence(40);
    // A: zero crossing revealed by -200 (offset 8)
    add('{200, 800, 1600, 2000, 1600, 800, 200, 100, -200, -800, -1600, -2000, -1600, -800, -200}, 8);
    silence(100);
    // B: mirrored
    add('{-200, -800, -1600, -2000, -1600, -800, -200, -100, 200, 800, 1600, 2000, 1600, 800, 200}, 8);
    silence(100);
    // C: 1500 is a peak and is followed at once by a negative value; the
    // negative peak -1500 is revealed by -200 (offset 4)
    add('{200, 1500, -300, -1500, -200, -100}, 4);
    silence(100);
    // D: candidate without an opposite peak
    add('{300, 900, 2000, 900, 300, 0, -50, -100, -50, -20}, -1);
    silence(100);
    // E: below the thresholds
    add('{50, 120, 150, 120, 50, -50, -120, -150, -120, -50}, -1);
    silence(100);
    // A again after the thresholds moved
    add('{200, 800, 1600, 2000, 1600, 800, 200, 100, -200, -800, -1600, -2000, -1600, -800, -200}, 8);
    silence(100);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < seq.size(); ) begin
      @(negedge clk);
      if (en) begin
        // the edge just passed consumed sample i-1
        bit e;
        e = 0;
        foreach (expect_at[j]) if (expect_at[j] == i - 1) e = 1;
        checks++;
        if (qrs_indication != e) begin
          failures++;
          $display("sample %0d: indication %0b expected %0b (fsm1=%0d fsm2=%0d)", i - 1, qrs_indication, e, fsm1_state, fsm2_state);
        end
        if (qrs_indication) n_ind++;
      end
      en = ($urandom_range(0, 2) != 0);
      coeff = 14'(seq[i]);
      if (en) i++;
    end
    checks++;
    if (n_ind != expect_at.size()) begin
      failures++;
      $display("indications %0d expected %0d", n_ind, expect_at.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
