// End-to-end test of fft64_r4_top at its default sizes (4-bit samples and
// coefficients, 4-bit DFT-four results, 8-bit outputs).
//
// Every output of every group is compared with the reference model. The
// test counts how often each behaviour of the datapath occurred and fails
// if one never did: a 4-bit DFT-four result wrapping, an 8-bit twiddle
// product sum wrapping, a complex twiddle rotating X(1) (Tf4 != 0), and the
// worked example [1,0,1,1] -> [3, j, 1, -j] passing through each group,
// and a coefficient being dropped by the compression step at the four
// tolerances of the original study.
module tb_fft64_r4_top;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic [255:0]      a;
  logic [255:0]      tf;
  logic [15:0]       tol;
  logic signed [7:0] x  [64];
  logic signed [7:0] xc [64];
  logic [6:0]        n_nonzero, n_dropped;

  // tolerances of the original compression study as Q0.16 fractions
  localparam int TOLS [4] = '{50, 213, 857, 2572};

  int n_d4_wrap = 0, n_out_wrap = 0, n_rotate = 0, n_example = 0, n_drop = 0;

  fft64_r4_top dut (.a(a), .tf(tf), .tol(tol), .x(x), .xc(xc),
                    .n_nonzero(n_nonzero), .n_dropped(n_dropped));

  // Compression of the 64 results x against tol, from the definition:
  // keep a lane iff |x| >= (tol / 2^16) * max |x|.
  task automatic check_compress();
    int mx, nz, nd;
    mx = 0;
    for (int i = 0; i < 64; i++) if ((x[i] < 0 ? -int'(x[i]) : int'(x[i])) > mx) mx = (x[i] < 0) ? -int'(x[i]) : int'(x[i]);
    nz = 0;
    nd = 0;
    for (int i = 0; i < 64; i++) begin
      longint m;
      bit keep;
      m = (x[i] < 0) ? -longint'(x[i]) : longint'(x[i]);
      keep = (m * 65536) >= longint'(mx) * longint'(tol);
      if (x[i] != 0) begin
        nz++;
        if (!keep) nd++;
      end
      checks++;
      if (xc[i] != (keep ? x[i] : 8'sd0)) begin
        failures++;
        if (failures < 10) $display("xc[%0d] got %0d x=%0d", i, xc[i], x[i]);
      end
    end
    n_drop += nd;
    checks += 2;
    if (int'(n_nonzero) != nz) begin failures++; $display("n_nonzero %0d exp %0d", n_nonzero, nz); end
    if (int'(n_dropped) != nd) begin failures++; $display("n_dropped %0d exp %0d", n_dropped, nd); end
  endtask

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare all 64 outputs with the reference and count behaviours.
  task automatic check_all();
    int s [16];
    int t [16];
    int ev4 [8], od4 [8], evr [8], odr [8];
    int ev4w [8], od4w [8], evw [8], odw [8];
    for (int g = 0; g < 4; g++) begin
      for (int i = 0; i < 16; i++) begin
        s[i] = field(1024'(a), 256, 4, 16*g + i);
        t[i] = field(1024'(tf), 256, 4, 16*g + i);
      end
      group(s, t, 4, 8, ev4, od4, evr, odr);
      group(s, t, 16, 16, ev4w, od4w, evw, odw);   // wide: no wrapping
      for (int j = 0; j < 8; j++) begin
        if (ev4[j] != ev4w[j] || od4[j] != od4w[j]) n_d4_wrap++;
      end
      // a product sum wraps when the 4-bit-fed stage exceeds 8 bits
      begin
        int y [4], p [4], tt [4], big [4];
        for (int h = 0; h < 4; h++) begin
          for (int k = 0; k < 4; k++) begin
            p[k]  = (h < 2) ? od4[4*h + k] : ev4[4*(h-2) + k];
            tt[k] = t[4*h + k];
          end
          twiddle(p, tt, 16, big);
          twiddle(p, tt, 8, y);
          for (int k = 0; k < 4; k++) if (big[k] != y[k]) n_out_wrap++;
          if (tt[3] != 0 && (p[1] != 0 || p[3] != 0)) n_rotate++;
        end
      end
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (int'(x[16*g + j]) != odr[j]) begin
          failures++;
          if (failures < 10) $display("x[%0d] got %0d exp %0d", 16*g + j, x[16*g + j], odr[j]);
        end
        if (int'(x[16*g + 8 + j]) != evr[j]) begin
          failures++;
          if (failures < 10) $display("x[%0d] got %0d exp %0d", 16*g + 8 + j, x[16*g + 8 + j], evr[j]);
        end
      end
    end
  endtask

  initial begin
    // Worked example in every group: samples 0, 4, 8, 12 = 1, 0, 1, 1 feed
    // the first even DFT four; with unit weights (Tf9..Tf11 = 1, Tf12 = 0) the group's
    // outputs 8..11 must read X(0)=3, Re X(1)=0, X(2)=1, Im X(1)=1.
    a   = '0;
    tf  = '0;
    tol = '0;
    for (int g = 0; g < 4; g++) begin
      a[255 - 4*(16*g + 0) -: 4]  = 4'd1;
      a[255 - 4*(16*g + 8) -: 4]  = 4'd1;
      a[255 - 4*(16*g + 12) -: 4] = 4'd1;
      for (int i = 8; i < 11; i++) tf[255 - 4*(16*g + i) -: 4] = 4'd1;
    end
    #1;
    check_all();
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (x[16*g + 8] == 3 && x[16*g + 9] == 0 && x[16*g + 10] == 1 && x[16*g + 11] == 1)
        n_example++;
      else begin
        failures++;
        $display("example failed in group %0d", g);
      end
    end
    // Full-scale case: the first odd DFT four (samples 1, 5, 9, 13 =
    // -8, 0, 0, -8) gives Re X(1) = Im X(1) = -8; with Tf2 = Tf4 = -8 the
    // imaginary product sum is 128 and wraps the 8-bit output.
    a  = '0;
    tf = '0;
    a[255 - 4*1 -: 4]  = 4'h8;
    a[255 - 4*13 -: 4] = 4'h8;
    tf[255 - 4*1 -: 4] = 4'h8;
    tf[255 - 4*3 -: 4] = 4'h8;
    #1;
    check_all();
    checks++;
    if (x[3] != -8'sd128) begin
      failures++;
      $display("full-scale case: x[3] = %0d", x[3]);
    end
    // random operands
    for (int r = 0; r < 3000; r++) begin
      for (int i = 0; i < 8; i++) begin
        a[32*i +: 32]  = $urandom;
        tf[32*i +: 32] = $urandom;
      end
      tol = 16'(TOLS[r % 4]);
      #1;
      check_all();
      check_compress();
    end
    $display("behaviours: dft4_wrap=%0d out_wrap=%0d complex_rotate=%0d example=%0d dropped=%0d",
             n_d4_wrap, n_out_wrap, n_rotate, n_example, n_drop);
    checks += 5;
    if (n_drop == 0)     begin failures++; $display("no coefficient was dropped"); end
    if (n_d4_wrap == 0)  begin failures++; $display("DFT-four wrap never happened"); end
    if (n_out_wrap == 0) begin failures++; $display("output wrap never happened"); end
    if (n_rotate == 0)   begin failures++; $display("complex twiddle never applied"); end
    if (n_example != 4)  begin failures++; $display("example not seen in all groups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
