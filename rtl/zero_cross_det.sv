// zero_cross_det - zero-crossing detector for a two's complement series.
//
// Compares each new sample with the previous one (eq. (6) of the method):
//   previous <= 0 and current > 0  -> code ZC_RISE (1)
//   previous >= 0 and current < 0  -> code ZC_FALL (2)
//   otherwise                      -> code ZC_NONE (0)
// The 1-bit indication zc is set for either crossing and also when the
// current sample is exactly zero, so a series that touches zero is flagged
// at once. The 2-bit code drives peak detection; the 1-bit flag drives the
// decision FSM.
//
// Timing: on a cycle with en = 1 the sample x is compared with the one taken
// at the previous enable; code and zc are registered and hold until the
// next enable. The previous-sample register resets to zero.
module zero_cross_det
  import qrs_pkg::*;
#(
  parameter int unsigned W = COEFF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output zc_code_e            code,
  output logic                zc
);

  logic signed [W-1:0] x_prev;
  zc_code_e            code_d;

  always_comb begin
    if (x_prev <= 0 && x > 0)      code_d = ZC_RISE;
    else if (x_prev >= 0 && x < 0) code_d = ZC_FALL;
    else                           code_d = ZC_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= '0;
      code   <= ZC_NONE;
      zc     <= 1'b0;
    end else if (en) begin
      x_prev <= x;
      code   <= code_d;
      zc     <= (code_d != ZC_NONE) || (x == '0);
    end
  end

endmodule
