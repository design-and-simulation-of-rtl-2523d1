// Data split of one Topbutter group: cuts a 64-bit word into sixteen
// signed 4-bit samples x[0]..x[15].
//
// Sample 0 is the most significant nibble, so the word reads left to right
// as x0 x1 ... x15; this follows the original description, whose vectors are
// numbered from the MSB (bit 0 = MSB). Pure wiring, no timing.
module datasplit16
#(
  parameter int W   = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int PTS = fft_r4_pkg::CFG_GROUP_PTS
) (
  input  logic [PTS*W-1:0]        a,
  output logic signed [W-1:0]     x [PTS]
);
  for (genvar i = 0; i < PTS; i++) begin : g_split
    assign x[i] = a[(PTS-i)*W-1 -: W];
  end
endmodule
