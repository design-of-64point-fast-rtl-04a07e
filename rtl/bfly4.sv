// bfly4 - radix-4 butterfly: the length-4 DFT of four samples, scaled by 1/4.
//
// The inputs are the four samples of one butterfly after their twiddle
// multiplication (input q already multiplied by W^(q*k)). The transform is
// built as two levels of radix-2 butterflies, the form the 4-point DFT takes
// when split into even and odd samples:
//   a0 = x0 + x2    a1 = x0 - x2    b0 = x1 + x3    b1 = x1 - x3
//   y0 = a0 + b0    y1 = a1 - j*b1  y2 = a0 - b0    y3 = a1 + j*b1
// so that y_p = sum_q x_q * (-j)^(p*q). The multiplication by -j is a swap
// of real and imaginary parts and a negation, so the butterfly has no
// multiplier. Each output is divided by 4, rounded to nearest, and
// saturated to OUT_W bits; sat is high when any of the eight output
// components was clamped. With the divide by 4 a full FFT built from these
// butterflies returns X[k]/N.
//
// Purely combinational. The butterfly structure follows the published design; the
// per-stage scaling, rounding and saturation are this design's choices.
module bfly4
  import fft_pkg::*;
#(
  parameter int IN_W  = 9,
  parameter int OUT_W = 8
) (
  input  logic signed [IN_W-1:0]  x_re [4],
  input  logic signed [IN_W-1:0]  x_im [4],
  output logic signed [OUT_W-1:0] y_re [4],
  output logic signed [OUT_W-1:0] y_im [4],
  output logic                    sat
);

  int a0_re, a0_im, a1_re, a1_im, b0_re, b0_im, b1_re, b1_im;
  int s_re [4];
  int s_im [4];

  always_comb begin
    // first level: 2-point butterflies on (x0, x2) and (x1, x3)
    a0_re = int'(x_re[0]) + int'(x_re[2]);
    a0_im = int'(x_im[0]) + int'(x_im[2]);
    a1_re = int'(x_re[0]) - int'(x_re[2]);
    a1_im = int'(x_im[0]) - int'(x_im[2]);
    b0_re = int'(x_re[1]) + int'(x_re[3]);
    b0_im = int'(x_im[1]) + int'(x_im[3]);
    b1_re = int'(x_re[1]) - int'(x_re[3]);
    b1_im = int'(x_im[1]) - int'(x_im[3]);
    // second level; -j*b1 = (b1_im, -b1_re)
    s_re[0] = a0_re + b0_re;
    s_im[0] = a0_im + b0_im;
    s_re[1] = a1_re + b1_im;
    s_im[1] = a1_im - b1_re;
    s_re[2] = a0_re - b0_re;
    s_im[2] = a0_im - b0_im;
    s_re[3] = a1_re - b1_im;
    s_im[3] = a1_im + b1_re;
    // scale by 1/4, round, saturate
    sat = 1'b0;
    for (int p = 0; p < 4; p++) begin
      s_re[p] = round_shift(s_re[p], 2);
      s_im[p] = round_shift(s_im[p], 2);
      sat     = sat | overflows(s_re[p], OUT_W) | overflows(s_im[p], OUT_W);
      y_re[p] = OUT_W'(saturate(s_re[p], OUT_W));
      y_im[p] = OUT_W'(saturate(s_im[p], OUT_W));
    end
  end

endmodule
