// Butter R4: twiddle-factor multiplication of one DFT-four result.
//
// Input lanes carry a packed 4-point DFT of real data: x[0] = X(0),
// x[1] = Re X(1), x[2] = X(2), x[3] = Im X(1). The four twiddle inputs
// tf[0..3] (Tf1..Tf4) weight them:
//   y[0] = X(0) * Tf1
//   y[2] = X(2) * Tf3
//   y[1] + j y[3] = X(1) * (Tf2 + j Tf4)
//     y[1] = Re X(1)*Tf2 - Im X(1)*Tf4
//     y[3] = Re X(1)*Tf4 + Im X(1)*Tf2
// Six signed IN_W x TF_W multipliers give IN_W+TF_W bit products (4x4->8 by
// default, as in the original); sums and differences are cut to OUT_W
// bits and so wrap modulo 256 by default, like the original's 8-bit adders.
// The coefficients are plain signed integers; read as Q1.2 numbers
// (1.0 = 4) the outputs carry two fraction bits. The original names this
// step a complex twiddle multiplication but does not say how its four
// coefficients form twiddles: using Tf2/Tf4 as the complex twiddle of X(1)
// and Tf1/Tf3 as real weights of the real bins is this implementation's
// choice. Combinational.
module butter_r4
#(
  parameter int IN_W  = fft_r4_pkg::CFG_D4_W,
  parameter int TF_W  = fft_r4_pkg::CFG_TF_W,
  parameter int OUT_W = fft_r4_pkg::CFG_OUT_W
) (
  input  logic signed [IN_W-1:0]  x  [4],
  input  logic signed [TF_W-1:0]  tf [4],
  output logic signed [OUT_W-1:0] y  [4]
);
  localparam int PW = IN_W + TF_W;          // exact product width
  localparam int SW = (PW + 1 > OUT_W) ? PW + 1 : OUT_W;

  logic signed [PW-1:0] p_r0, p_r2, p_rr, p_ii, p_ri, p_ir;
  logic signed [SW-1:0] full [4];

  always_comb begin
    p_r0 = PW'(x[0]) * PW'(tf[0]);
    p_r2 = PW'(x[2]) * PW'(tf[2]);
    p_rr = PW'(x[1]) * PW'(tf[1]);
    p_ii = PW'(x[3]) * PW'(tf[3]);
    p_ri = PW'(x[1]) * PW'(tf[3]);
    p_ir = PW'(x[3]) * PW'(tf[1]);
    full[0] = SW'(p_r0);
    full[2] = SW'(p_r2);
    full[1] = SW'(p_rr) - SW'(p_ii);
    full[3] = SW'(p_ri) + SW'(p_ir);
  end

  for (genvar k = 0; k < 4; k++) begin : g_out
    assign y[k] = full[k][OUT_W-1:0];
  end
endmodule
