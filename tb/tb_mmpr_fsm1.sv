// tb_mmpr_fsm1 - self-checking test of the decision FSM.
// A reference model of the state diagram (written as a table of
// transitions on an integer state) runs beside the FSM on random events:
// peaks of random amplitude against fixed thresholds and random zero
// crossings, with event density varied so that both time-outs happen.
// State, QRS_candidate and QRS_confirm are compared after every clock.
// Every path is counted and must occur: case 1 (via Seen_zero), case 2
// (peak straight to opposite peak), TOL time-out from Seen_peak and from
// Seen_zero, end of the refractory period, positive-first and
// negative-first pairs. The time spent in Seen_opposite must be RP+1
// samples, the TOL time-out must come after TOL+1 idle samples.
module tb_mmpr_fsm1;
  import qrs_pkg::*;
  localparam int TOL = 21, RP = 25;
  logic clk = 0, rst_n = 0, en = 0;
  peak_e peak = PK_NONE;
  logic signed [13:0] peak_val = '0;
  logic zc = 0;
  logic signed [13:0] th_pos = 14'sd500, th_neg = -14'sd400;
  logic qrs_candidate, qrs_confirm;
  fsm1_state_e state;
  int checks = 0, failures = 0;

  // reference
  int rs = 0, rcnt = 0, rdir = 0, rcand = 0, rconf = 0;
  int c_case1 = 0, c_case2 = 0, c_tol_peak = 0, c_tol_zero = 0, c_rp = 0, c_negfirst = 0, c_posfirst = 0;
  int opp_len = 0, bad_len = 0, idle = 0;

  mmpr_fsm1 #(.W(14), .TOL(TOL), .RP(RP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_step(int pk, int val, int z);
    bit pos, neg, opp;
    pos = (pk != 0) && (val > int'(th_pos));
    neg = (pk != 0) && (val < int'(th_neg));
    opp = (rdir == 1) ? pos : neg;     // rdir 1: first peak was negative
    case (rs)
      0: if (pos || neg) begin
           rs = 1; rdir = pos ? 0 : 1; rcnt = 0; idle = 0;
           if (pos) c_posfirst++; else c_negfirst++;
         end
      1: if (opp) begin rs = 3; rcand = 1; rconf = 1; rcnt = 0; c_case2++; opp_len = 0; end
         else if (z) begin rs = 2; rcand = 1; rcnt = 0; idle = 0; end
         else if (rcnt >= TOL) begin
           rs = 0; rcnt = 0; c_tol_peak++;
           if (idle + 1 != TOL + 1) bad_len++;  // this sample is the (TOL+1)-th
         end
         else begin rcnt++; idle++; end
      2: begin
           rcand = 0;
           if (opp) begin rs = 3; rconf = 1; rcnt = 0; c_case1++; opp_len = 0; end
           else if (rcnt >= TOL) begin
             rs = 0; rcnt = 0; c_tol_zero++;
             if (idle + 1 != TOL + 1) bad_len++;  // this sample is the (TOL+1)-th
           end
           else begin rcnt++; idle++; end
         end
      3: begin
           rcand = 0;
           opp_len++;
           if (rcnt >= RP) begin
             rs = 0; rconf = 0; rcnt = 0; c_rp++;
             if (opp_len != RP + 1) bad_len++;
           end else begin rconf = 1; rcnt++; end
         end
      default: ;
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60000; k++) begin
      int dens;
      @(negedge clk);
      checks++;
      if (int'(state) != rs || int'(qrs_candidate) != rcand || int'(qrs_confirm) != rconf) begin
        failures++;
        if (failures < 10)
          $display("k=%0d state=%0d cand=%0b conf=%0b exp %0d %0d %0d", k, state, qrs_candidate, qrs_confirm, rs, rcand, rconf);
      end
      // event density changes every 3000 cycles
      dens = ((k / 3000) % 3 == 0) ? 4 : ((k / 3000) % 3 == 1) ? 20 : 60;
      en = ($urandom_range(0, 5) != 0);
      peak = ($urandom_range(0, dens - 1) == 0) ? peak_e'($urandom_range(1, 2)) : PK_NONE;
      peak_val = 14'(int'($urandom_range(0, 3000)) - 1500);
      zc = ($urandom_range(0, dens - 1) == 0);
      if (en) ref_step(int'(peak), int'(peak_val), int'(zc));
    end
    checks++;
    if (c_case1 == 0 || c_case2 == 0 || c_tol_peak == 0 || c_tol_zero == 0 || c_rp == 0 ||
        c_negfirst == 0 || c_posfirst == 0 || bad_len != 0) begin
      failures++;
    end
    $display("case1=%0d case2=%0d tol_peak=%0d tol_zero=%0d rp=%0d posfirst=%0d negfirst=%0d badlen=%0d",
             c_case1, c_case2, c_tol_peak, c_tol_zero, c_rp, c_posfirst, c_negfirst, bad_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
