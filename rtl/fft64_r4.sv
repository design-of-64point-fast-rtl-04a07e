// fft64_r4 - fully parallel radix-4 decimation-in-time FFT, 64 points.
//
// All N complex samples enter at once and all N bins leave at once; there is
// no clock. The transform is unrolled completely:
//   * data split: the inputs are wired in base-4 digit-reversed order
//     (sample digit_rev4(i) feeds position i), which puts every group of
//     every fourth sample next to each other for the first stage;
//   * log4(N) stages of N/4 radix-4 butterflies. In stage s (group length
//     L = 4^(s+1), Q = L/4) butterfly b works on positions
//     base + q*Q, q = 0..3, with base = (b / Q)*L + (b % Q). Input q is first
//     multiplied by W_L^(q*j) = W_N^(q*j*N/L), j = b % Q (twiddle_mult: three
//     non-trivial multiplies per butterfly at most, none in stage 0), then
//     the four go through a length-4 DFT (bfly4) and return to the same
//     positions. After the last stage the bins are in natural order.
// Every butterfly divides by 4, so y[k] = X[k]/N, rounded and saturated to
// DATA_W bits per component; sat is high when any butterfly clamped.
//
// Interface: x_re/x_im[n] time samples, y_re/y_im[k] frequency bins, all
// DATA_W-bit two's complement. N must be a power of 4 (64 by default; 16
// and 256 work too). Combinational delay: log4(N) twiddle multipliers and
// butterflies in series.
//
// The radix-4 DIT decomposition, the 64-point size, 8-bit samples and the
// fully parallel organisation (whole frame in and out together, split
// stage in front of the butterflies) follow the published design. Twiddle width,
// scaling by 1/4 per stage, rounding and saturation are this design's own.
module fft64_r4
  import fft_pkg::*;
#(
  parameter int N      = 64,
  parameter int DATA_W = 8,
  parameter int TW_W   = 10
) (
  input  logic signed [DATA_W-1:0] x_re [N],
  input  logic signed [DATA_W-1:0] x_im [N],
  output logic signed [DATA_W-1:0] y_re [N],
  output logic signed [DATA_W-1:0] y_im [N],
  output logic                     sat
);

  localparam int S = num_digits(N, 2);   // number of radix-4 stages

  // split-stage output, and each stage's input and output vectors (one
  // array per stage, so no vector is both read and written by a stage)
  logic signed [DATA_W-1:0] sp_re [N];
  logic signed [DATA_W-1:0] sp_im [N];
  logic        [N/4-1:0]    bsat [S];

  // data split: base-4 digit-reversed input order
  for (genvar i = 0; i < N; i++) begin : g_split
    assign sp_re[i] = x_re[digit_rev(i, 2, S)];
    assign sp_im[i] = x_im[digit_rev(i, 2, S)];
  end

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int L = 4 ** (s + 1);
    localparam int Q = L / 4;
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
    for (genvar b = 0; b < N / 4; b++) begin : g_bf
      localparam int J    = b % Q;
      localparam int BASE = (b / Q) * L + J;
      logic signed [DATA_W:0]   t_re [4];
      logic signed [DATA_W:0]   t_im [4];
      logic signed [DATA_W-1:0] o_re [4];
      logic signed [DATA_W-1:0] o_im [4];
      for (genvar q = 0; q < 4; q++) begin : g_tw
        twiddle_mult #(
          .N(N), .K(q * J * (N / L)), .IN_W(DATA_W), .TW_W(TW_W)
        ) u_tw (
          .a_re(d_re[BASE + q * Q]),
          .a_im(d_im[BASE + q * Q]),
          .y_re(t_re[q]),
          .y_im(t_im[q])
        );
      end
      bfly4 #(.IN_W(DATA_W + 1), .OUT_W(DATA_W)) u_bf (
        .x_re(t_re), .x_im(t_im), .y_re(o_re), .y_im(o_im), .sat(bsat[s][b])
      );
      for (genvar p = 0; p < 4; p++) begin : g_out
        assign r_re[BASE + p * Q] = o_re[p];
        assign r_im[BASE + p * Q] = o_im[p];
      end
    end
  end

  assign y_re = g_stage[S-1].r_re;
  assign y_im = g_stage[S-1].r_im;

  always_comb begin
    sat = 1'b0;
    for (int s = 0; s < S; s++) sat = sat | (|bsat[s]);
  end

endmodule
