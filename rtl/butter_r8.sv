// Butter R8: the eight-lane twiddle stage of one half (even or odd part)
// of a Topbutter, built from two Butter R4 units as in the original.
//
// Lanes 0-3 (x1..x4, Tf1..Tf4) form the first Butter R4 and hold one
// DFT-four result; lanes 4-7 (x5..x8, Tf5..Tf8) form the second.
// Combinational; see butter_r4 for the arithmetic.
module butter_r8
#(
  parameter int IN_W  = fft_r4_pkg::CFG_D4_W,
  parameter int TF_W  = fft_r4_pkg::CFG_TF_W,
  parameter int OUT_W = fft_r4_pkg::CFG_OUT_W
) (
  input  logic signed [IN_W-1:0]  x  [8],
  input  logic signed [TF_W-1:0]  tf [8],
  output logic signed [OUT_W-1:0] y  [8]
);
  for (genvar h = 0; h < 2; h++) begin : g_r4
    logic signed [IN_W-1:0]  xs [4];
    logic signed [TF_W-1:0]  ts [4];
    logic signed [OUT_W-1:0] ys [4];
    for (genvar k = 0; k < 4; k++) begin : g_lane
      assign xs[k]       = x[4*h + k];
      assign ts[k]       = tf[4*h + k];
      assign y[4*h + k]  = ys[k];
    end
    butter_r4 #(.IN_W(IN_W), .TF_W(TF_W), .OUT_W(OUT_W)) u_r4 (
      .x(xs), .tf(ts), .y(ys)
    );
  end
endmodule
