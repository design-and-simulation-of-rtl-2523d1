// Exhaustive test of dft_four: all 65,536 input combinations, once at the
// default 4-bit output (sums wrap modulo 16) and once with a 6-bit output
// that holds every result exactly. Also checks the worked example
// [1,0,1,1] -> X = [3, j, 1, -j].
module tb_dft_four;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic signed [3:0] x [4];
  logic signed [3:0] xx4 [4];
  logic signed [5:0] xx6 [4];

  dft_four dut (.x(x), .xx(xx4));
  dft_four #(.IN_W(4), .OUT_W(6)) dut_wide (.x(x), .xx(xx6));

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
    int p4 [4];
    int p6 [4];
    int wraps = 0;
    for (int v = 0; v < 65536; v++) begin
      for (int n = 0; n < 4; n++) begin
        xi[n] = wrap((v >> (4 * n)) & 15, 4);
        x[n]  = 4'(xi[n]);
      end
      #1;
      dft4(xi, 4, p4);
      dft4(xi, 6, p6);
      if (p4[0] != p6[0]) wraps++;
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (int'(xx4[k]) != p4[k]) begin
          failures++;
          if (failures < 10) $display("4-bit mismatch v=%0d k=%0d got %0d exp %0d", v, k, xx4[k], p4[k]);
        end
        if (int'(xx6[k]) != p6[k]) begin
          failures++;
          if (failures < 10) $display("6-bit mismatch v=%0d k=%0d got %0d exp %0d", v, k, xx6[k], p6[k]);
        end
      end
    end
    // worked example: [1,0,1,1] -> X(0)=3, X(1)=j, X(2)=1, X(3)=-j
    x = '{4'sd1, 4'sd0, 4'sd1, 4'sd1};
    #1;
    checks++;
    if (!(xx4[0] == 3 && xx4[1] == 0 && xx4[2] == 1 && xx4[3] == 1)) begin
      failures++;
      $display("example failed: %0d %0d %0d %0d", xx4[0], xx4[1], xx4[2], xx4[3]);
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("no wrap-around case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
