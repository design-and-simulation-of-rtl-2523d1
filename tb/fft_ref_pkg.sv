// Reference arithmetic for the testbenches, written independently of the
// RTL: the 4-point DFT is evaluated from its definition with an integer
// table of cos/sin(2*pi*k*n/4), and results are wrapped to a bit width the
// way a two's-complement register of that width would hold them.
package fft_ref_pkg;
  // cos and sin of 2*pi*q/4 for q = 0..3
  localparam int COS4 [4] = '{1, 0, -1, 0};
  localparam int SIN4 [4] = '{0, 1, 0, -1};

  // Value of v held in a signed register of w bits.
  function automatic int wrap(int v, int w);
    int m;
    m = v & ((1 << w) - 1);
    if (m >= (1 << (w - 1))) m -= (1 << w);
    return m;
  endfunction

  // Signed value of nibble-sized field i (0 = most significant) of a word.
  function automatic int field(logic [1023:0] word, int nbits, int w, int i);
    logic [1023:0] t;
    t = word >> (nbits - w * (i + 1));
    return wrap(int'(t[31:0]), w);
  endfunction

  // Packed 4-point DFT of real x: X(0), Re X(1), X(2), Im X(1), each wrapped.
  function automatic void dft4(input int x [4], input int w, output int p [4]);
    int re [4];
    int im [4];
    for (int k = 0; k < 4; k++) begin
      re[k] = 0;
      im[k] = 0;
      for (int n = 0; n < 4; n++) begin
        re[k] += x[n] * COS4[(k * n) % 4];
        im[k] -= x[n] * SIN4[(k * n) % 4];
      end
    end
    p[0] = wrap(re[0], w);
    p[1] = wrap(re[1], w);
    p[2] = wrap(re[2], w);
    p[3] = wrap(im[1], w);
  endfunction

  // Twiddle stage: real weights for X(0) and X(2), complex twiddle
  // (t1 + j t3) for X(1) = p1 + j p3; results wrapped to w bits.
  function automatic void twiddle(input int p [4], input int t [4], input int w,
                                  output int y [4]);
    y[0] = wrap(p[0] * t[0], w);
    y[2] = wrap(p[2] * t[2], w);
    y[1] = wrap(p[1] * t[1] - p[3] * t[3], w);
    y[3] = wrap(p[1] * t[3] + p[3] * t[1], w);
  endfunction

  // One 16-sample group: four packed DFTs over the samples of index class
  // r (mod 4) -- od takes classes 1 and 3, ev classes 0 and 2 -- then the
  // twiddle stage with Tf1..Tf8 on od and Tf9..Tf16 on ev.
  function automatic void group(input int s [16], input int t [16], input int d4w,
                                input int ow, output int ev4 [8], output int od4 [8],
                                output int ev [8], output int od [8]);
    int cls [4] = '{1, 3, 0, 2};   // class of DFT unit 0..3
    int xin [4];
    int p [4];
    int tt [4];
    int yy [4];
    for (int u = 0; u < 4; u++) begin
      for (int m = 0; m < 4; m++) xin[m] = s[4*m + cls[u]];
      dft4(xin, d4w, p);
      for (int k = 0; k < 4; k++) begin
        if (u < 2) od4[4*u + k] = p[k];
        else       ev4[4*(u-2) + k] = p[k];
      end
    end
    for (int h = 0; h < 2; h++) begin
      for (int k = 0; k < 4; k++) begin
        p[k] = od4[4*h + k];
        tt[k] = t[4*h + k];
      end
      twiddle(p, tt, ow, yy);
      for (int k = 0; k < 4; k++) od[4*h + k] = yy[k];
      for (int k = 0; k < 4; k++) begin
        p[k] = ev4[4*h + k];
        tt[k] = t[8 + 4*h + k];
      end
      twiddle(p, tt, ow, yy);
      for (int k = 0; k < 4; k++) ev[4*h + k] = yy[k];
    end
  endfunction

  // True when v does not fit a signed register of w bits.
  function automatic bit overflows(int v, int w);
    return (v >= (1 << (w - 1))) || (v < -(1 << (w - 1)));
  endfunction
endpackage
