// fft_top - the two FFT processors side by side.
//
// r4_*: the 64-point radix-4 decimation-in-time FFT (fft64_r4), the main
//       design. r4_x_* are the 64 time samples, r4_y_* the 64 bins X[k]/64,
//       r4_sat flags a saturated butterfly anywhere in the transform.
// r2_*: the 32-point radix-2 decimation-in-time FFT (fft32_r2), built the
//       same way; r2_y_* are X[k]/32.
// Both are purely combinational and independent of each other: the result
// follows the input after the combinational delay, with no clock or
// handshake. All samples are DATA_W-bit two's complement real and
// imaginary parts.
//
// Carrying the 64-point radix-4 and the 32-point radix-2 transforms follows
// the published design; the interface form (parallel arrays, separate real and
// imaginary parts, saturation flags) is this design's own.
module fft_top #(
  parameter int N4     = 64,
  parameter int N2     = 32,
  parameter int DATA_W = 8,
  parameter int TW_W   = 10
) (
  input  logic signed [DATA_W-1:0] r4_x_re [N4],
  input  logic signed [DATA_W-1:0] r4_x_im [N4],
  output logic signed [DATA_W-1:0] r4_y_re [N4],
  output logic signed [DATA_W-1:0] r4_y_im [N4],
  output logic                     r4_sat,
  input  logic signed [DATA_W-1:0] r2_x_re [N2],
  input  logic signed [DATA_W-1:0] r2_x_im [N2],
  output logic signed [DATA_W-1:0] r2_y_re [N2],
  output logic signed [DATA_W-1:0] r2_y_im [N2],
  output logic                     r2_sat
);

  fft64_r4 #(.N(N4), .DATA_W(DATA_W), .TW_W(TW_W)) u_fft64_r4 (
    .x_re(r4_x_re), .x_im(r4_x_im), .y_re(r4_y_re), .y_im(r4_y_im), .sat(r4_sat)
  );

  fft32_r2 #(.N(N2), .DATA_W(DATA_W), .TW_W(TW_W)) u_fft32_r2 (
    .x_re(r2_x_re), .x_im(r2_x_im), .y_re(r2_y_re), .y_im(r2_y_im), .sat(r2_sat)
  );

endmodule
