// Coefficient compression: drops the small transform coefficients of one
// 64-lane result and counts what was dropped.
//
// Each lane is a real number (a real bin, or the real or imaginary part of
// a complex bin), so real and imaginary parts are thresholded separately.
// The tolerance is relative to the largest magnitude in the block:
//   keep lane i  iff  |x[i]| >= tol * max_j |x[j]|
// with tol an unsigned fraction of TOL_W bits (value tol / 2^TOL_W). The
// comparison is exact: |x| * 2^TOL_W is compared with tol * max, so no
// rounding is involved. Dropped lanes read 0 on y.
//   n_nonzero  number of lanes with x != 0
//   n_dropped  number of nonzero lanes that were set to 0
// The drop ratio of the block is n_dropped / n_nonzero; summing both counts
// over the blocks of an image gives the image's ratio.
//
// Thresholding Fourier coefficients against a tolerance and reporting the
// drop ratio follow the original compression flow. Making the tolerance
// relative to the block maximum, its fixed-point format and the >= keep
// rule are this implementation's choices. Combinational.
module coeff_compress #(
  parameter int N     = fft_r4_pkg::CFG_N_POINTS,
  parameter int W     = fft_r4_pkg::CFG_OUT_W,
  parameter int TOL_W = 16
) (
  input  logic signed [W-1:0]     x [N],
  input  logic [TOL_W-1:0]        tol,
  output logic signed [W-1:0]     y [N],
  output logic [$clog2(N+1)-1:0]  n_nonzero,
  output logic [$clog2(N+1)-1:0]  n_dropped
);
  localparam int CW = $clog2(N + 1);
  localparam int PW = W + TOL_W;            // width of both sides of the compare

  logic [W-1:0]  mag [N];                   // |x|, up to 2^(W-1)
  logic [W-1:0]  max_mag;
  logic [PW-1:0] limit;
  logic          keep [N];

  always_comb begin
    max_mag = '0;
    for (int i = 0; i < N; i++) begin
      mag[i] = x[i][W-1] ? W'(-x[i]) : W'(x[i]);
      if (mag[i] > max_mag) max_mag = mag[i];
    end
    limit = PW'(max_mag) * PW'(tol);
  end

  always_comb begin
    n_nonzero = '0;
    n_dropped = '0;
    for (int i = 0; i < N; i++) begin
      keep[i] = {mag[i], {TOL_W{1'b0}}} >= limit;
      y[i]    = keep[i] ? x[i] : '0;
      if (x[i] != '0) begin
        n_nonzero = n_nonzero + CW'(1);
        if (!keep[i]) n_dropped = n_dropped + CW'(1);
      end
    end
  end
endmodule
