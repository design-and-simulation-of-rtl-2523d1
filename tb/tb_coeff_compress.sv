// Test of coeff_compress: random blocks at the four tolerances of the
// original compression study (0.0007625, 0.003246, 0.013075, 0.03924 as
// Q0.16 values 50, 213, 857, 2572) plus 0 and near-1 tolerances, with
// sparse and full-scale blocks. Kept lanes, zeroed lanes and both counts
// are compared with a reference evaluated in real arithmetic.
module tb_coeff_compress;
  logic clk;
  int checks = 0, failures = 0;
  logic signed [7:0] x [64];
  logic signed [7:0] y [64];
  logic [15:0]       tol;
  logic [6:0]        n_nonzero, n_dropped;
  int n_drop_seen = 0, n_keep_seen = 0;

  localparam int TOLS [6] = '{50, 213, 857, 2572, 0, 65535};

  coeff_compress dut (.x(x), .tol(tol), .y(y), .n_nonzero(n_nonzero), .n_dropped(n_dropped));

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

  function automatic real absr(logic signed [7:0] v);
    return (v < 0) ? -real'(v) : real'(v);
  endfunction

  initial begin
    for (int r = 0; r < 3000; r++) begin
      real mx, lim;
      int nz, nd;
      tol = 16'(TOLS[r % 6]);
      for (int i = 0; i < 64; i++) begin
        case ((r / 6) % 4)
          0: x[i] = 8'($urandom);
          1: x[i] = ($urandom % 4 == 0) ? 8'($urandom) : 8'($urandom % 5) - 8'sd2;
          2: x[i] = ($urandom % 8 == 0) ? -8'sd128 : 8'($urandom % 3) - 8'sd1;
          default: x[i] = 8'(($urandom % 64) - 32);
        endcase
      end
      #1;
      mx = 0.0;
      for (int i = 0; i < 64; i++) if (absr(x[i]) > mx) mx = absr(x[i]);
      lim = mx * real'(tol) / 65536.0;
      nz = 0;
      nd = 0;
      for (int i = 0; i < 64; i++) begin
        bit keep;
        keep = absr(x[i]) >= lim;
        if (x[i] != 0) begin
          nz++;
          if (!keep) nd++;
        end
        if (keep && x[i] != 0) n_keep_seen++;
        if (!keep) n_drop_seen++;
        checks++;
        if (y[i] != (keep ? x[i] : 8'sd0)) begin
          failures++;
          if (failures < 10) $display("lane %0d x=%0d tol=%0d got %0d", i, x[i], tol, y[i]);
        end
      end
      checks += 2;
      if (int'(n_nonzero) != nz) begin failures++; $display("n_nonzero %0d exp %0d", n_nonzero, nz); end
      if (int'(n_dropped) != nd) begin failures++; $display("n_dropped %0d exp %0d", n_dropped, nd); end
    end
    checks += 2;
    if (n_drop_seen == 0) begin failures++; $display("no lane was dropped"); end
    if (n_keep_seen == 0) begin failures++; $display("no lane was kept"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
