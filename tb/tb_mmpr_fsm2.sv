// tb_mmpr_fsm2 - self-checking test of the marking FSM.
// QRS_candidate pulses arrive at random times and QRS_confirm is driven
// high or low for a random stretch after each. The reference predicts the
// indication: a candidate accepted in Seen_none leads, DLY + 2 enabled
// samples later, to an indication equal to QRS_confirm at that sample; all
// other samples have no indication. Confirmed and rejected candidates and
// candidates ignored while busy are counted and required.
module tb_mmpr_fsm2;
  import qrs_pkg::*;
  localparam int DLY = 21;
  logic clk = 0, rst_n = 0, en = 0;
  logic qrs_candidate = 0, qrs_confirm = 0;
  logic qrs_indication;
  fsm2_state_e state;
  int checks = 0, failures = 0;
  int busy = 0, left = 0, exp_ind = 0;
  int n_conf = 0, n_rej = 0, n_ignored = 0;

  mmpr_fsm2 #(.DLY(DLY)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(qrs_indication) != exp_ind) begin
        failures++;
        if (failures < 10) $display("k=%0d ind=%0b exp %0d", k, qrs_indication, exp_ind);
      end
      en = ($urandom_range(0, 3) != 0);
      qrs_candidate = ($urandom_range(0, 30) == 0);
      if ($urandom_range(0, 15) == 0) qrs_confirm = ~qrs_confirm;
      if (en) begin
        exp_ind = 0;
        if (busy) begin
          if (qrs_candidate) n_ignored++;
          if (left == 0) begin
            exp_ind = int'(qrs_confirm);
            if (qrs_confirm) n_conf++; else n_rej++;
            busy = 0;
          end else left--;
        end else if (qrs_candidate) begin
          busy = 1;
          left = DLY + 1;   // samples in Seen_candidate
        end
      end
    end
    checks++;
    if (n_conf < 20 || n_rej < 20 || n_ignored < 20) failures++;
    $display("confirmed=%0d rejected=%0d ignored=%0d", n_conf, n_rej, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
