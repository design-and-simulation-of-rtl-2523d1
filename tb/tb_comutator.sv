// Test of comutator: random 64-bit group words against the reference
// (split, reorder by index modulo 4, four 4-point DFTs wrapped to 4 bits).
module tb_comutator;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic [63:0]       a;
  logic signed [3:0] ev [8];
  logic signed [3:0] od [8];

  comutator dut (.a(a), .ev(ev), .od(od));
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
    int s [16];
    int t [16];
    int ev4 [8];
    int od4 [8];
    int evr [8];
    int odr [8];
    for (int i = 0; i < 16; i++) t[i] = 0;
    for (int r = 0; r < 5000; r++) begin
      a = {$urandom, $urandom};
      #1;
      for (int i = 0; i < 16; i++) s[i] = field(1024'(a), 64, 4, i);
      group(s, t, 4, 8, ev4, od4, evr, odr);
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (int'(ev[j]) != ev4[j]) begin failures++; if (failures < 10) $display("ev[%0d] got %0d exp %0d", j, ev[j], ev4[j]); end
        if (int'(od[j]) != od4[j]) begin failures++; if (failures < 10) $display("od[%0d] got %0d exp %0d", j, od[j], od4[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
