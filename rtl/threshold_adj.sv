// threshold_adj - adaptive positive and negative thresholds.
//
// Every detected peak of the wavelet coefficients is classified against the
// current threshold of its side (eq. (8)): at or beyond the threshold it is a
// signal peak (caused by a QRS complex), otherwise a noise peak. Each side
// keeps the amplitudes of its last M signal peaks and last M noise peaks in
// shift registers with running sums, so the averaged levels are
//   ASPL = (sum of last M signal peaks) / M,  ANPL = (sum of last M noise peaks) / M
// (eq. (9), (10)) and the threshold is TH = ANPL + beta * (ASPL - ANPL)
// (eq. (11)), with beta = BETA_X16 / 16. M must be a power of two.
//
// Sides: local maxima with a positive amplitude update the positive side;
// local minima with a negative amplitude update the negative side, which
// works on magnitudes and outputs th_neg = -TH. Other peaks are ignored.
//
// Timing: peak/peak_val are taken on cycles with en = 1; a classified peak
// changes the thresholds from the next clock on. After reset the signal
// registers hold INIT_SIGNAL and the noise registers zero, so the
// thresholds start at +/-(beta * INIT_SIGNAL).
// M = 8 and the equations follow the description; beta, the start-up
// values and the side assignment are choices of this design.
module threshold_adj
  import qrs_pkg::*;
#(
  parameter int unsigned W           = COEFF_W,
  parameter int unsigned M           = 8,
  parameter int unsigned BETA_X16    = 4,
  parameter int unsigned INIT_SIGNAL = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  peak_e               peak,
  input  logic signed [W-1:0] peak_val,
  output logic signed [W-1:0] th_pos,
  output logic signed [W-1:0] th_neg
);

  localparam int unsigned MAG_W = W - 1;               // magnitude of a peak
  localparam int unsigned LOG_M = $clog2(M);
  localparam int unsigned SUM_W = MAG_W + LOG_M;

  // index 0: positive side, 1: negative side
  logic [MAG_W-1:0] sig_buf   [2][M];
  logic [MAG_W-1:0] noise_buf [2][M];
  logic [SUM_W-1:0] sig_sum   [2];
  logic [SUM_W-1:0] noise_sum [2];
  logic [MAG_W-1:0] th_mag    [2];

  // threshold of one side from its two sums (combinational)
  function automatic logic [MAG_W-1:0] calc_th(logic [SUM_W-1:0] ssum,
                                               logic [SUM_W-1:0] nsum);
    logic signed [MAG_W+1:0] aspl, anpl, diff, t;
    logic signed [MAG_W+6:0] prod;
    aspl = (MAG_W+2)'(ssum >> LOG_M);
    anpl = (MAG_W+2)'(nsum >> LOG_M);
    diff = aspl - anpl;
    prod = (MAG_W+7)'(diff) * (MAG_W+7)'(BETA_X16);
    t    = anpl + (MAG_W+2)'(prod >>> 4);
    if (t < 0) return '0;
    else if (t > (MAG_W+2)'({MAG_W{1'b1}})) return '1;
    else return MAG_W'(t);
  endfunction

  always_comb begin
    for (int s = 0; s < 2; s++) th_mag[s] = calc_th(sig_sum[s], noise_sum[s]);
  end

  assign th_pos = signed'({1'b0, th_mag[0]});
  assign th_neg = -signed'({1'b0, th_mag[1]});

  // which side, the peak's magnitude and its class
  logic             upd;
  logic             side;
  logic [MAG_W-1:0] mag;
  logic             is_signal;

  always_comb begin
    upd  = 1'b0;
    side = 1'b0;
    mag  = '0;
    if (peak == PK_MAX && peak_val > 0) begin
      upd  = 1'b1;
      side = 1'b0;
      mag  = MAG_W'(peak_val);
    end else if (peak == PK_MIN && peak_val < 0) begin
      upd  = 1'b1;
      side = 1'b1;
      // -(-8192) does not fit: clamp to the largest magnitude
      mag  = (peak_val == {1'b1, {(W-1){1'b0}}}) ? '1 : MAG_W'(-peak_val);
    end
    is_signal = (mag >= th_mag[side]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        for (int i = 0; i < M; i++) begin
          sig_buf[s][i]   <= MAG_W'(INIT_SIGNAL);
          noise_buf[s][i] <= '0;
        end
        sig_sum[s]   <= SUM_W'(INIT_SIGNAL * M);
        noise_sum[s] <= '0;
      end
    end else if (en && upd) begin
      if (is_signal) begin
        sig_buf[side][0] <= mag;
        for (int i = 1; i < M; i++) sig_buf[side][i] <= sig_buf[side][i-1];
        sig_sum[side] <= sig_sum[side] + SUM_W'(mag) - SUM_W'(sig_buf[side][M-1]);
      end else begin
        noise_buf[side][0] <= mag;
        for (int i = 1; i < M; i++) noise_buf[side][i] <= noise_buf[side][i-1];
        noise_sum[side] <= noise_sum[side] + SUM_W'(mag) - SUM_W'(noise_buf[side][M-1]);
      end
    end
  end

endmodule
