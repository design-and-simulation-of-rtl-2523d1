// 64-point radix-4 transform unit with coefficient compression,
// 4-bit samples in, 8-bit results out.
//
// The 256-bit input word a holds 64 signed 4-bit samples, sample 0 in the
// most significant nibble. datasplit256 (M1) cuts it into four 16-sample
// group words; each goes to a Topbutter (M2..M5) together with its own
// 64-bit slice of the twiddle word tf (M2 takes the most significant
// slice). Each Topbutter computes four 4-point DFTs and multiplies them by
// its 16 twiddle coefficients. Results are ordered as in the original:
// group g drives x[16g+0..16g+7] from its odd part and x[16g+8..16g+15]
// from its even part.
//
// The 64 results then pass through coeff_compress, the compression step
// of the image coder: lanes whose magnitude is below tol times the largest
// magnitude of the block are set to zero on xc, and the number of nonzero
// and of dropped lanes is reported for the drop ratio.
//
// The datapath is purely combinational (no clock, no reset, no registers),
// like the original, which reports a single input-to-output delay. Every
// width is a parameter whose default is the original's: 4-bit samples and
// coefficients, 4-bit DFT-four results, 8-bit products. The order of the
// twiddle slices and outputs for the second to fourth group extends the
// pattern given for the first; that is this implementation's choice.
module fft64_r4_top
#(
  parameter int W   = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int D4W = fft_r4_pkg::CFG_D4_W,
  parameter int TFW = fft_r4_pkg::CFG_TF_W,
  parameter int OW  = fft_r4_pkg::CFG_OUT_W,
  parameter int TOLW = 16
) (
  input  logic [64*W-1:0]      a,
  input  logic [64*TFW-1:0]    tf,
  input  logic [TOLW-1:0]      tol,        // relative tolerance, tol / 2^TOLW
  output logic signed [OW-1:0] x  [64],    // transform results
  output logic signed [OW-1:0] xc [64],    // results after compression
  output logic [6:0]           n_nonzero,  // nonzero lanes of x
  output logic [6:0]           n_dropped   // nonzero lanes zeroed in xc
);
  localparam int N  = fft_r4_pkg::CFG_N_POINTS;
  localparam int GP = fft_r4_pkg::CFG_GROUP_PTS;
  localparam int NG = N / GP;                 // 4 groups (M2..M5)
  localparam int GW = GP * W;

  logic [GW-1:0] grp [NG];

  // datasplit256 cuts the input into exactly four groups
  if (NG != 4) begin : g_bad_size
    $error("fft64_r4_top: N_POINTS must be 4 x GROUP_PTS");
  end

  datasplit256 #(.W(W), .PTS(GP)) u_m1 (
    .a(a), .b(grp[0]), .c(grp[1]), .d(grp[2]), .e(grp[3])
  );

  for (genvar g = 0; g < NG; g++) begin : g_top
    logic signed [TFW-1:0] tfs [16];
    logic signed [OW-1:0]  ev  [8];
    logic signed [OW-1:0]  od  [8];
    for (genvar i = 0; i < 16; i++) begin : g_tf
      assign tfs[i] = tf[(N - GP*g - i)*TFW - 1 -: TFW];
    end
    for (genvar i = 0; i < 8; i++) begin : g_out
      assign x[16*g + i]     = od[i];
      assign x[16*g + 8 + i] = ev[i];
    end
    topbutter #(.W(W), .D4W(D4W), .TFW(TFW), .OW(OW)) u_tb (
      .a(grp[g]), .tf(tfs), .ev(ev), .od(od)
    );
  end

  coeff_compress #(.N(64), .W(OW), .TOL_W(TOLW)) u_cmp (
    .x(x), .tol(tol), .y(xc), .n_nonzero(n_nonzero), .n_dropped(n_dropped)
  );
endmodule
