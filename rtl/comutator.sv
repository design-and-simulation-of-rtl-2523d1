// Comutator: the first radix-4 stage of one 16-sample group.
//
// A 64-bit group word is cut into sixteen 4-bit samples (datasplit16),
// reordered by index modulo 4 (odd_even_part) and passed through four
// DFT-four units, as in the original:
//   od[0..3] = DFT4(x1, x5, x9,  x13)   od[4..7] = DFT4(x3, x7, x11, x15)
//   ev[0..3] = DFT4(x0, x4, x8,  x12)   ev[4..7] = DFT4(x2, x6, x10, x14)
// Each run of four outputs is one packed DFT-four result
// (X(0), Re X(1), X(2), Im X(1)). Combinational.
module comutator
#(
  parameter int W    = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int D4W  = fft_r4_pkg::CFG_D4_W
) (
  input  logic [16*W-1:0]        a,
  output logic signed [D4W-1:0]  ev [8],
  output logic signed [D4W-1:0]  od [8]
);
  logic signed [W-1:0] xs  [16];
  logic signed [W-1:0] evs [8];
  logic signed [W-1:0] ods [8];

  datasplit16 #(.W(W), .PTS(16)) u_split (.a(a), .x(xs));
  odd_even_part #(.W(W)) u_oe (.x(xs), .ev(evs), .od(ods));

  // Unit 0/1 work on the odd samples, 2/3 on the even ones.
  for (genvar u = 0; u < 4; u++) begin : g_dft
    logic signed [W-1:0]   din  [4];
    logic signed [D4W-1:0] dout [4];
    for (genvar k = 0; k < 4; k++) begin : g_lane
      if (u < 2) begin : g_od
        assign din[k]        = ods[4*u + k];
        assign od[4*u + k]   = dout[k];
      end else begin : g_ev
        assign din[k]          = evs[4*(u-2) + k];
        assign ev[4*(u-2) + k] = dout[k];
      end
    end
    dft_four #(.IN_W(W), .OUT_W(D4W)) u_d4 (.x(din), .xx(dout));
  end
endmodule
