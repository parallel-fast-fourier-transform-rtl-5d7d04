// r4_butterfly: four-point DFT, the radix-4 decimation-in-frequency
// butterfly at the heart of the iterative FFT core.
//
// Given four complex samples x0..x3 it returns
//   a0 = x0 +   x1 + x2 +   x3
//   a1 = x0 - j*x1 - x2 + j*x3
//   a2 = x0 -   x1 + x2 -   x3
//   a3 = x0 + j*x1 - x2 - j*x3
// Multiplications by +-j are swaps and negations, so the block is adders
// only. The outputs are two bits wider than the inputs so nothing overflows;
// scaling and the twiddle rotation happen after it, in the core.
// Purely combinational. The four-point DIF structure follows the document;
// widths and the separation of the twiddle multiply are this design's choice.
module r4_butterfly #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0]   x_re [4],
  input  logic signed [W-1:0]   x_im [4],
  output logic signed [W+1:0]   a_re [4],
  output logic signed [W+1:0]   a_im [4]
);
  logic signed [W+1:0] r0, r1, r2, r3, i0, i1, i2, i3;
  logic signed [W+1:0] s02_re, s02_im, d02_re, d02_im;
  logic signed [W+1:0] s13_re, s13_im, d13_re, d13_im;

  always_comb begin
    r0 = (W+2)'(x_re[0]); i0 = (W+2)'(x_im[0]);
    r1 = (W+2)'(x_re[1]); i1 = (W+2)'(x_im[1]);
    r2 = (W+2)'(x_re[2]); i2 = (W+2)'(x_im[2]);
    r3 = (W+2)'(x_re[3]); i3 = (W+2)'(x_im[3]);
    s02_re = r0 + r2; s02_im = i0 + i2;
    d02_re = r0 - r2; d02_im = i0 - i2;
    s13_re = r1 + r3; s13_im = i1 + i3;
    d13_re = r1 - r3; d13_im = i1 - i3;
    // a0 = (x0+x2) + (x1+x3)
    a_re[0] = s02_re + s13_re;  a_im[0] = s02_im + s13_im;
    // a1 = (x0-x2) - j(x1-x3): -j*(u+jv) = v - ju
    a_re[1] = d02_re + d13_im;  a_im[1] = d02_im - d13_re;
    // a2 = (x0+x2) - (x1+x3)
    a_re[2] = s02_re - s13_re;  a_im[2] = s02_im - s13_im;
    // a3 = (x0-x2) + j(x1-x3): j*(u+jv) = -v + ju
    a_re[3] = d02_re - d13_im;  a_im[3] = d02_im + d13_re;
  end

endmodule
