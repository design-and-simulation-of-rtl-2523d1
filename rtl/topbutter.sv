// Topbutter: one 16-sample radix-4 group (instances M2..M5 of the original).
//
// The comutator computes four 4-point DFTs over the samples grouped by
// index modulo 4. Two Butter R8 units then apply the group's sixteen
// twiddle coefficients, as the original wires them:
//   even part: ev1..ev8 with Tf9..Tf16 (tf[8..15])  -> ev11..ev88 (ev[0..7])
//   odd part:  od1..od8 with Tf1..Tf8  (tf[0..7])   -> od11..od88 (od[0..7])
// There is no further combining stage inside the group: the sixteen twiddle
// products are the group's result. Combinational.
module topbutter
#(
  parameter int W     = fft_r4_pkg::CFG_SAMPLE_W,
  parameter int D4W   = fft_r4_pkg::CFG_D4_W,
  parameter int TFW   = fft_r4_pkg::CFG_TF_W,
  parameter int OW    = fft_r4_pkg::CFG_OUT_W
) (
  input  logic [16*W-1:0]       a,
  input  logic signed [TFW-1:0] tf [16],
  output logic signed [OW-1:0]  ev [8],
  output logic signed [OW-1:0]  od [8]
);
  logic signed [D4W-1:0] ev4 [8];
  logic signed [D4W-1:0] od4 [8];
  logic signed [TFW-1:0] tf_od [8];
  logic signed [TFW-1:0] tf_ev [8];

  comutator #(.W(W), .D4W(D4W)) u_com (.a(a), .ev(ev4), .od(od4));

  for (genvar i = 0; i < 8; i++) begin : g_tf
    assign tf_od[i] = tf[i];
    assign tf_ev[i] = tf[8 + i];
  end

  butter_r8 #(.IN_W(D4W), .TF_W(TFW), .OUT_W(OW)) u_even (
    .x(ev4), .tf(tf_ev), .y(ev)
  );
  butter_r8 #(.IN_W(D4W), .TF_W(TFW), .OUT_W(OW)) u_odd (
    .x(od4), .tf(tf_od), .y(od)
  );
endmodule
