// bfly2 - radix-2 butterfly, scaled by 1/2.
//
// The lower input b is taken after its twiddle multiplication (b = W^k * p1),
// so the butterfly only adds and subtracts:
//   y0 = (a + b) / 2      y1 = (a - b) / 2
// which is the pair P[k] = p0 + W^k p1, P[k+N/2] = p0 - W^k p1 of one
// radix-2 decimation-in-time step. Each output component is rounded to
// nearest and saturated to OUT_W bits; sat is high when any of the four
// output components was clamped. A radix-2 FFT built from these butterflies
// returns X[k]/N.
//
// Purely combinational. The butterfly follows the published design; the scaling,
// rounding and saturation are this design's choices.
module bfly2
  import fft_pkg::*;
#(
  parameter int IN_W  = 9,
  parameter int OUT_W = 8
) (
  input  logic signed [IN_W-1:0]  a_re,
  input  logic signed [IN_W-1:0]  a_im,
  input  logic signed [IN_W-1:0]  b_re,
  input  logic signed [IN_W-1:0]  b_im,
  output logic signed [OUT_W-1:0] y0_re,
  output logic signed [OUT_W-1:0] y0_im,
  output logic signed [OUT_W-1:0] y1_re,
  output logic signed [OUT_W-1:0] y1_im,
  output logic                    sat
);

  int s0_re, s0_im, s1_re, s1_im;

  always_comb begin
    s0_re = round_shift(int'(a_re) + int'(b_re), 1);
    s0_im = round_shift(int'(a_im) + int'(b_im), 1);
    s1_re = round_shift(int'(a_re) - int'(b_re), 1);
    s1_im = round_shift(int'(a_im) - int'(b_im), 1);
    sat   = overflows(s0_re, OUT_W) | overflows(s0_im, OUT_W)
          | overflows(s1_re, OUT_W) | overflows(s1_im, OUT_W);
    y0_re = OUT_W'(saturate(s0_re, OUT_W));
    y0_im = OUT_W'(saturate(s0_im, OUT_W));
    y1_re = OUT_W'(saturate(s1_re, OUT_W));
    y1_im = OUT_W'(saturate(s1_im, OUT_W));
  end

endmodule
