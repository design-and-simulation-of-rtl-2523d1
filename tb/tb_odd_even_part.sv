// Test of odd_even_part: each lane must carry the sample of the index
// modulo-4 class it stands for (ev: classes 0 and 2, od: classes 1 and 3).
// Distinct values per lane make any swapped wire visible.
module tb_odd_even_part;
  logic clk;
  int checks = 0, failures = 0;
  logic signed [3:0] x  [16];
  logic signed [3:0] ev [8];
  logic signed [3:0] od [8];

  odd_even_part dut (.x(x), .ev(ev), .od(od));
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
    for (int r = 0; r < 500; r++) begin
      // r = 0: x[i] = i - 8 (all distinct); afterwards random
      for (int i = 0; i < 16; i++) x[i] = (r == 0) ? 4'(i - 8) : 4'($urandom);
      #1;
      for (int j = 0; j < 8; j++) begin
        int m, cls;
        m   = j % 4;
        cls = (j < 4) ? 0 : 2;
        checks += 2;
        if (ev[j] != x[4*m + cls])     begin failures++; $display("ev[%0d]", j); end
        if (od[j] != x[4*m + cls + 1]) begin failures++; $display("od[%0d]", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
