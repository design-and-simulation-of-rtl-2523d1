// Test of butter_r8: random data and twiddles; lanes 0-3 and 4-7 are two
// independent twiddle units and must match the reference each.
module tb_butter_r8;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic signed [3:0] x  [8];
  logic signed [3:0] tf [8];
  logic signed [7:0] y  [8];

  butter_r8 dut (.x(x), .tf(tf), .y(y));
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

  initial begin
    int xi [4];
    int ti [4];
    int ye [4];
    for (int r = 0; r < 20000; r++) begin
      for (int i = 0; i < 8; i++) begin
        x[i]  = 4'($urandom);
        tf[i] = 4'($urandom);
      end
      #1;
      for (int h = 0; h < 2; h++) begin
        for (int k = 0; k < 4; k++) begin
          xi[k] = int'(x[4*h + k]);
          ti[k] = int'(tf[4*h + k]);
        end
        twiddle(xi, ti, 8, ye);
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(y[4*h + k]) != ye[k]) begin
            failures++;
            if (failures < 10) $display("lane %0d got %0d exp %0d", 4*h + k, y[4*h + k], ye[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
