// Test of butter_r4: exhaustive over the data inputs for a sweep of
// twiddle sets, plus random vectors, against the reference complex
// multiply. Includes twiddles 1.0 (Q1.2 value 4), -j and a full-scale
// case whose sum wraps the 8-bit output.
module tb_butter_r4;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic signed [3:0] x  [4];
  logic signed [3:0] tf [4];
  logic signed [7:0] y  [4];

  butter_r4 dut (.x(x), .tf(tf), .y(y));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_check(input int xi [4], input int ti [4]);
    int ye [4];
    for (int n = 0; n < 4; n++) begin
      x[n]  = 4'(xi[n]);
      tf[n] = 4'(ti[n]);
    end
    #1;
    twiddle(xi, ti, 8, ye);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(y[k]) != ye[k]) begin
        failures++;
        if (failures < 10)
          $display("mismatch x=%p tf=%p k=%0d got %0d exp %0d", xi, ti, k, y[k], ye[k]);
      end
    end
  endtask

  initial begin
    int xi [4];
    int ti [4];
    // identity twiddles (Q1.2: 1.0 = 4, Tf4 = 0): y = 4 * input
    ti = '{4, 4, 4, 0};
    for (int v = 0; v < 65536; v++) begin
      for (int n = 0; n < 4; n++) xi[n] = wrap((v >> (4 * n)) & 15, 4);
      apply_check(xi, ti);
    end
    // -j twiddle on X(1): Tf2 = 0, Tf4 = -4
    ti = '{4, 0, -4, -4};
    for (int v = 0; v < 65536; v += 7) begin
      for (int n = 0; n < 4; n++) xi[n] = wrap((v >> (4 * n)) & 15, 4);
      apply_check(xi, ti);
    end
    // full scale: (-8)(-8) - (7)(-8) = 120 fits; (-8)(-8) + (-8)(-8) = 128 wraps
    apply_check('{-8, -8, -8, -8}, '{-8, -8, -8, -8});
    apply_check('{7, -8, 7, 7}, '{-8, -8, 7, -8});
    // random
    for (int r = 0; r < 20000; r++) begin
      for (int n = 0; n < 4; n++) begin
        xi[n] = wrap($urandom & 15, 4);
        ti[n] = wrap($urandom & 15, 4);
      end
      apply_check(xi, ti);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
