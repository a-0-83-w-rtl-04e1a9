// peak_det - peak (zero-derivative) detector for the wavelet coefficients.
//
// The first difference d[n] = x[n+1] - x[n] (a [1 -1] filter, one bit wider
// than x so it cannot overflow) is fed to a zero-crossing detector. A
// difference rising through zero marks a local minimum (PK_MIN, code 1 of
// the crossing rule), a difference falling through zero a local maximum
// (PK_MAX, code 2).
//
// Timing: the peak is the sample before the one that reveals it, and the
// crossing detector registers its result, so when peak != PK_NONE the peak
// sample is the coefficient taken two enables earlier (the Z^-2 path of the
// recognition stage supplies its amplitude). Outputs hold between enables.
module peak_det
  import qrs_pkg::*;
#(
  parameter int unsigned W = COEFF_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output peak_e               peak
);

  logic signed [W-1:0] x_prev;
  logic signed [W:0]   d;
  zc_code_e            d_code;
  logic                d_zc_unused;

  assign d = (W+1)'(x) - (W+1)'(x_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_prev <= '0;
    else if (en) x_prev <= x;
  end

  zero_cross_det #(.W(W + 1)) u_dzc (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x    (d),
    .code (d_code),
    .zc   (d_zc_unused)
  );

  always_comb begin
    unique case (d_code)
      ZC_RISE: peak = PK_MIN;
      ZC_FALL: peak = PK_MAX;
      default: peak = PK_NONE;
    endcase
  end

endmodule
