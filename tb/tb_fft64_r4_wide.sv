// fft64_r4_top built with widths that cannot overflow: 6-bit DFT-four
// results (a sum of four 4-bit samples needs 6) and 11-bit outputs (a sum
// of two 6x4-bit products needs 11). Random operands and full-scale
// corner cases; every output must equal the exact, unwrapped reference.
module tb_fft64_r4_wide;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic [255:0]       a;
  logic [255:0]       tf;
  logic signed [10:0] x  [64];
  logic signed [10:0] xc [64];
  logic [6:0]         n_nonzero, n_dropped;

  // tol = 0 keeps every lane, so xc must equal x
  fft64_r4_top #(.D4W(6), .OW(11)) dut (.a(a), .tf(tf), .tol(16'd0), .x(x), .xc(xc),
                                        .n_nonzero(n_nonzero), .n_dropped(n_dropped));

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

  task automatic check_all();
    int s [16];
    int t [16];
    int ev4 [8], od4 [8], evr [8], odr [8];
    for (int g = 0; g < 4; g++) begin
      for (int i = 0; i < 16; i++) begin
        s[i] = field(1024'(a), 256, 4, 16*g + i);
        t[i] = field(1024'(tf), 256, 4, 16*g + i);
      end
      group(s, t, 24, 24, ev4, od4, evr, odr);   // exact
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (int'(x[16*g + j]) != odr[j]) begin
          failures++;
          if (failures < 10) $display("x[%0d] got %0d exp %0d", 16*g + j, x[16*g + j], odr[j]);
        end
        if (xc[16*g + j] != x[16*g + j] || xc[16*g + 8 + j] != x[16*g + 8 + j]) failures++;
        if (int'(x[16*g + 8 + j]) != evr[j]) begin
          failures++;
          if (failures < 10) $display("x[%0d] got %0d exp %0d", 16*g + 8 + j, x[16*g + 8 + j], evr[j]);
        end
      end
    end
  endtask

  initial begin
    // full-scale corners: all samples -8 or 7, all coefficients -8 or 7
    for (int c = 0; c < 4; c++) begin
      a  = (c[0]) ? {64{4'h7}} : {64{4'h8}};
      tf = (c[1]) ? {64{4'h7}} : {64{4'h8}};
      #1;
      check_all();
    end
    for (int r = 0; r < 3000; r++) begin
      for (int i = 0; i < 8; i++) begin
        a[32*i +: 32]  = $urandom;
        tf[32*i +: 32] = $urandom;
      end
      #1;
      check_all();
      checks++;
      if (n_dropped != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
