// Data split of the full input (instance M1 of the original design):
// cuts the 256-bit input word into four 64-bit group words b, c, d, e.
//
// b holds the most significant quarter (samples 0-15), e the least
// significant one (samples 48-63); the original numbers its vectors from
// the MSB, so b is its A(0:63), c A(64:127), d A(128:191), e A(192:255).
// Each group word feeds one Topbutter. Pure wiring, no timing.
module datasplit256
#(
  parameter int W   = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int PTS = fft_r4_pkg::CFG_GROUP_PTS
) (
  input  logic [4*PTS*W-1:0] a,
  output logic [PTS*W-1:0]   b,
  output logic [PTS*W-1:0]   c,
  output logic [PTS*W-1:0]   d,
  output logic [PTS*W-1:0]   e
);
  localparam int GW = PTS * W;
  assign b = a[4*GW-1 -: GW];
  assign c = a[3*GW-1 -: GW];
  assign d = a[2*GW-1 -: GW];
  assign e = a[GW-1   -: GW];
endmodule
