// Test of datasplit16: random 64-bit words; every sample must equal the
// matching nibble, sample 0 taken from the most significant end.
module tb_datasplit16;
  import fft_ref_pkg::*;
  logic clk;
  int checks = 0, failures = 0;
  logic [63:0]       a;
  logic signed [3:0] x [16];

  datasplit16 dut (.a(a), .x(x));
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
      a = {$urandom, $urandom};
      if (r == 0) a = 64'h0123_4567_89ab_cdef;
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(x[i]) != field(1024'(a), 64, 4, i)) begin
          failures++;
          if (failures < 10) $display("x[%0d] got %0d", i, x[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
