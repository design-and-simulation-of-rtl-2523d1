// Shared sizes of the 64-point radix-4 transform unit.
//
// The unit takes 64 signed 4-bit samples packed into one 256-bit word,
// processes them in four independent 16-sample groups and returns 64
// signed 8-bit results. All of these numbers are the ones the original
// design uses; every module takes them as parameter defaults so a wider
// datapath can be built by overriding them.
package fft_r4_pkg;
  parameter int CFG_SAMPLE_W   = 4;   // input sample and twiddle coefficient width
  parameter int CFG_TF_W       = 4;   // twiddle coefficient width
  parameter int CFG_D4_W       = 4;   // DFT-four output width (same as the input)
  parameter int CFG_OUT_W      = 8;   // twiddle-product width (4 x 4 -> 8)
  parameter int CFG_N_POINTS   = 64;  // transform length
  parameter int CFG_GROUP_PTS  = 16;  // samples per Topbutter group
endpackage
