// DFT four: 4-point DFT of four real samples, the basic radix-4 unit.
//
// For real inputs x1..x4 the four bins are X(0), X(1), X(2) and
// X(3) = conj X(1), so four real numbers carry the whole result:
//   xx[0] = X(0)    = x1 + x2 + x3 + x4
//   xx[1] = Re X(1) = x1 - x3
//   xx[2] = X(2)    = x1 - x2 + x3 - x4
//   xx[3] = Im X(1) = x4 - x2
// (X(1) = x1 - j x2 - x3 + j x4.) Example: [1,0,1,1] gives X = [3, j, 1, -j],
// packed as xx = [3, 0, 1, 1].
//
// The sums are formed at full precision and then cut to OUT_W bits. The
// original design keeps the 4-bit width of the inputs, so by default large
// sums wrap around modulo 16 (two's complement); set OUT_W to IN_W+2 for an
// exact result. The packing of the complex bins into four real outputs is
// this implementation's reading of the original. Combinational.
module dft_four
#(
  parameter int IN_W  = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int OUT_W = fft_r4_pkg::CFG_D4_W
) (
  input  logic signed [IN_W-1:0]  x  [4],
  output logic signed [OUT_W-1:0] xx [4]
);
  localparam int FW = IN_W + 2;   // exact width of a sum of four samples
  localparam int MW = (OUT_W > FW) ? OUT_W : FW;

  logic signed [MW-1:0] s0, s2, d0, d1;
  logic signed [MW-1:0] full [4];

  always_comb begin
    s0 = MW'(x[0]) + MW'(x[2]);
    s2 = MW'(x[1]) + MW'(x[3]);
    d0 = MW'(x[0]) - MW'(x[2]);
    d1 = MW'(x[3]) - MW'(x[1]);
    full[0] = s0 + s2;
    full[1] = d0;
    full[2] = s0 - s2;
    full[3] = d1;
  end

  for (genvar k = 0; k < 4; k++) begin : g_out
    assign xx[k] = full[k][OUT_W-1:0];
  end
endmodule
