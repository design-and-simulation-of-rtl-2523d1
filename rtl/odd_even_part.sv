// Odd/even reorder of one 16-sample group ahead of the four DFT-four units.
//
// Radix-4 decimation in time splits the samples by their index modulo 4.
// The even residues (0 and 2) go to ev, the odd residues (1 and 3) to od:
//   ev[0..3] = x0  x4  x8  x12     ev[4..7] = x2  x6  x10 x14
//   od[0..3] = x1  x5  x9  x13     od[4..7] = x3  x7  x11 x15
// Each run of four then forms the input of one DFT four. The split into
// residue classes follows the original design; the exact ordering of the
// lanes inside ev and od is this implementation's choice. Pure wiring.
module odd_even_part
#(
  parameter int W = fft_r4_pkg::CFG_SAMPLE_W
) (
  input  logic signed [W-1:0] x  [16],
  output logic signed [W-1:0] ev [8],
  output logic signed [W-1:0] od [8]
);
  for (genvar m = 0; m < 4; m++) begin : g_perm
    assign ev[m]     = x[4*m + 0];
    assign ev[m + 4] = x[4*m + 2];
    assign od[m]     = x[4*m + 1];
    assign od[m + 4] = x[4*m + 3];
  end
endmodule
