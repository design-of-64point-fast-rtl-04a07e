// twiddle_mult - multiply one complex sample by the constant twiddle factor
// W_N^K = exp(-j*2*pi*K/N).
//
// The exponent K is a parameter, so every instance is a constant multiplier.
// The four trivial factors are done without a multiplier, exactly:
//   K = 0    : y =  a            K = N/4  : y = -j*a = ( a_im, -a_re)
//   K = N/2  : y = -a            K = 3N/4 : y = +j*a = (-a_im,  a_re)
// Any other K uses a rounded fixed-point complex multiply
//   y = a * (c + j*s),  c = cos(2*pi*K/N), s = -sin(2*pi*K/N)
// with c and s held in TW_W-bit two's complement with TW_W-2 fraction bits;
// the product is rounded to the nearest integer (halves toward +inf).
// The output is one bit wider than the input: a rotation can raise one
// component to sqrt(2) times the input's full scale, and -(-2^(IN_W-1))
// needs the extra bit too, so nothing overflows here.
//
// Purely combinational. That the butterflies' lower inputs are scaled by
// twiddle factors follows the published design; the number format, the rounding and
// the exact handling of the trivial factors are this design's choices.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int N    = 64,
  parameter int K    = 1,
  parameter int IN_W = 8,
  parameter int TW_W = 10
) (
  input  logic signed [IN_W-1:0] a_re,
  input  logic signed [IN_W-1:0] a_im,
  output logic signed [IN_W:0]   y_re,
  output logic signed [IN_W:0]   y_im
);

  localparam int FRAC = TW_W - 2;
  localparam int KM   = ((K % N) + N) % N;
  localparam int C    = tw_re(KM, N, FRAC);
  localparam int S    = tw_im(KM, N, FRAC);
  localparam int PW   = IN_W + TW_W + 1;   // product and sum width

  localparam logic signed [TW_W-1:0] CW = TW_W'(C);
  localparam logic signed [TW_W-1:0] SW = TW_W'(S);

  if (KM == 0) begin : g_one
    assign y_re = (IN_W+1)'(a_re);
    assign y_im = (IN_W+1)'(a_im);
  end else if (4 * KM == N) begin : g_minus_j
    assign y_re = (IN_W+1)'(a_im);
    assign y_im = -(IN_W+1)'(a_re);
  end else if (2 * KM == N) begin : g_minus_one
    assign y_re = -(IN_W+1)'(a_re);
    assign y_im = -(IN_W+1)'(a_im);
  end else if (4 * KM == 3 * N) begin : g_plus_j
    assign y_re = -(IN_W+1)'(a_im);
    assign y_im = (IN_W+1)'(a_re);
  end else begin : g_mult
    logic signed [PW-1:0] p_re, p_im;
    always_comb begin
      p_re = PW'(a_re) * PW'(CW) - PW'(a_im) * PW'(SW);
      p_im = PW'(a_re) * PW'(SW) + PW'(a_im) * PW'(CW);
      y_re = (IN_W+1)'((p_re + PW'(1 << (FRAC - 1))) >>> FRAC);
      y_im = (IN_W+1)'((p_im + PW'(1 << (FRAC - 1))) >>> FRAC);
    end
  end

endmodule
