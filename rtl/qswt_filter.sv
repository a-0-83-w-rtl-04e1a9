// qswt_filter - scale-3 quadratic spline wavelet transform ("a trous").
//
// The dyadic wavelet transform at scale 2^3 is computed without
// down-sampling by cascading the low-pass H(z) = (1 + 3z^-1 + 3z^-2 + z^-3)/8,
// the same filter with one zero between taps, H(z^2), and the high-pass
// G(z^4) = 2(1 - z^-4), which has three zeros between its two taps. The
// cascade is one 14-tap antisymmetric FIR filter whose output is a smoothed
// first derivative of the input: a rising edge gives a positive coefficient,
// so an R wave becomes a positive-maximum / negative-minimum pair.
//
// Arithmetic: the two low-pass stages are summed with integer taps
// (1,3,3,1) at full precision (15 and 18 bits), the high-pass forms
// s2[n] - s2[n-4] (19 bits), and the combined scale 2/64 = 1/32 is applied
// last by an arithmetic right shift of 5, dropping the fraction. The result
// always fits 14-bit two's complement (|w| <= 8190 for a 12-bit input).
//
// Timing: on each cycle with en = 1 one sample x is taken and w is updated
// with the coefficient that includes that sample (one register, so w is
// valid from the clock edge that takes x). Delay lines reset to zero.
// Scale 3, the a trous structure, 12-bit input and 14-bit truncated output
// follow the description; the tap values (1,3,3,1)/8 and the sign of G are
// read from the wavelet's definition.
module qswt_filter
  import qrs_pkg::*;
#(
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned OUT_W = COEFF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] w
);

  localparam int unsigned S1_W = IN_W + 3;   // gain 8
  localparam int unsigned S2_W = S1_W + 3;   // gain 64
  localparam int unsigned D_W  = S2_W + 1;   // difference
  localparam int unsigned SHIFT = 5;         // 2/64 = 2^-5

  // delay lines: x[n-1..n-3], s1[n-1..n-6], s2[n-1..n-4]
  logic signed [IN_W-1:0] xd  [1:3];
  logic signed [S1_W-1:0] s1d [1:6];
  logic signed [S2_W-1:0] s2d [1:4];

  logic signed [S1_W-1:0] s1;
  logic signed [S2_W-1:0] s2;
  logic signed [D_W-1:0]  dif;
  logic signed [D_W-1:0]  scaled;

  // H(z): taps 1,3,3,1 on consecutive samples
  assign s1 = S1_W'(x) + 3 * S1_W'(xd[1]) + 3 * S1_W'(xd[2]) + S1_W'(xd[3]);
  // H(z^2): taps 1,3,3,1 two samples apart
  assign s2 = S2_W'(s1) + 3 * S2_W'(s1d[2]) + 3 * S2_W'(s1d[4]) + S2_W'(s1d[6]);
  // G(z^4) without its factor 2 (folded into the shift)
  assign dif    = D_W'(s2) - D_W'(s2d[4]);
  assign scaled = dif >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xd  <= '{default: '0};
      s1d <= '{default: '0};
      s2d <= '{default: '0};
      w   <= '0;
    end else if (en) begin
      xd[1] <= x;
      for (int i = 2; i <= 3; i++) xd[i] <= xd[i-1];
      s1d[1] <= s1;
      for (int i = 2; i <= 6; i++) s1d[i] <= s1d[i-1];
      s2d[1] <= s2;
      for (int i = 2; i <= 4; i++) s2d[i] <= s2d[i-1];
      w <= OUT_W'(scaled);
    end
  end

endmodule
