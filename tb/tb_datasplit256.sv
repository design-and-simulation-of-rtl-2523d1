// Test of datasplit256: random 256-bit words; b must be the most
// significant quarter and e the least significant one.
module tb_datasplit256;
  logic clk;
  int checks = 0, failures = 0;
  logic [255:0] a;
  logic [63:0]  b, c, d, e;
  logic [63:0]  q [4];

  datasplit256 dut (.a(a), .b(b), .c(c), .d(d), .e(e));
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
    for (int r = 0; r < 2000; r++) begin
      for (int i = 0; i < 8; i++) a[32*i +: 32] = $urandom;
      #1;
      for (int g = 0; g < 4; g++) q[g] = 64'(a >> (64 * (3 - g)));
      checks += 4;
      if (b != q[0]) failures++;
      if (c != q[1]) failures++;
      if (d != q[2]) failures++;
      if (e != q[3]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
