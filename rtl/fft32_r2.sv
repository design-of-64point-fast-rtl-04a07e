// fft32_r2 - fully parallel radix-2 decimation-in-time FFT, 32 points.
//
// The radix-2 counterpart of fft64_r4, built the same way: all N complex
// samples in and all N bins out at once, no clock.
//   * the inputs are wired in bit-reversed order (sample bit_rev(i) feeds
//     position i), the even/odd split applied recursively;
//   * log2(N) stages of N/2 radix-2 butterflies. In stage s (group length
//     L = 2^(s+1), Q = L/2) butterfly b pairs positions base and base + Q,
//     base = (b / Q)*L + (b % Q); the lower one is multiplied by
//     W_L^j = W_N^(j*N/L), j = b % Q (twiddle_mult), the upper one only
//     sign-extended, and bfly2 writes the sum and difference back.
// Every butterfly divides by 2, so y[k] = X[k]/N, rounded and saturated to
// DATA_W bits per component; sat is high when any butterfly clamped.
//
// Interface: x_re/x_im[n] time samples, y_re/y_im[k] frequency bins, all
// DATA_W-bit two's complement. N must be a power of 2 (32 by default).
// Combinational delay: log2(N) twiddle multipliers and butterflies.
//
// The radix-2 DIT decomposition and the 32-point size follow the published design;
// its organisation (fully parallel like the 64-point design), widths,
// scaling, rounding and saturation are this design's own.
module fft32_r2
  import fft_pkg::*;
#(
  parameter int N      = 32,
  parameter int DATA_W = 8,
  parameter int TW_W   = 10
) (
  input  logic signed [DATA_W-1:0] x_re [N],
  input  logic signed [DATA_W-1:0] x_im [N],
  output logic signed [DATA_W-1:0] y_re [N],
  output logic signed [DATA_W-1:0] y_im [N],
  output logic                     sat
);

  localparam int S = num_digits(N, 1);   // number of radix-2 stages

  // split-stage output, and each stage's input and output vectors (one
  // array per stage, so no vector is both read and written by a stage)
  logic signed [DATA_W-1:0] sp_re [N];
  logic signed [DATA_W-1:0] sp_im [N];
  logic        [N/2-1:0]    bsat [S];

  // bit-reversed input order
  for (genvar i = 0; i < N; i++) begin : g_split
    assign sp_re[i] = x_re[digit_rev(i, 1, S)];
    assign sp_im[i] = x_im[digit_rev(i, 1, S)];
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int L = 2 ** (s + 1);
    localparam int Q = L / 2;
    logic signed [DATA_W-1:0] d_re [N];   // stage input
    logic signed [DATA_W-1:0] d_im [N];
    logic signed [DATA_W-1:0] r_re [N];   // stage output
    logic signed [DATA_W-1:0] r_im [N];
    if (s == 0) begin : g_first
      assign d_re = sp_re;
      assign d_im = sp_im;
    end else begin : g_next
      assign d_re = g_stage[s-1].r_re;
      assign d_im = g_stage[s-1].r_im;
    end
    for (genvar b = 0; b < N / 2; b++) begin : g_bf
      localparam int J    = b % Q;
      localparam int BASE = (b / Q) * L + J;
      logic signed [DATA_W:0] t_re, t_im;
      twiddle_mult #(
        .N(N), .K(J * (N / L)), .IN_W(DATA_W), .TW_W(TW_W)
      ) u_tw (
        .a_re(d_re[BASE + Q]),
        .a_im(d_im[BASE + Q]),
        .y_re(t_re),
        .y_im(t_im)
      );
      bfly2 #(.IN_W(DATA_W + 1), .OUT_W(DATA_W)) u_bf (
        .a_re ((DATA_W+1)'(d_re[BASE])),
        .a_im ((DATA_W+1)'(d_im[BASE])),
        .b_re (t_re),
        .b_im (t_im),
        .y0_re(r_re[BASE]),
        .y0_im(r_im[BASE]),
        .y1_re(r_re[BASE + Q]),
        .y1_im(r_im[BASE + Q]),
        .sat  (bsat[s][b])
      );
    end
  end

  assign y_re = g_stage[S-1].r_re;
  assign y_im = g_stage[S-1].r_im;

  always_comb begin
    sat = 1'b0;
    for (int s = 0; s < S; s++) sat = sat | (|bsat[s]);
  end

endmodule
