// tb_fft64_r4 - self-checking test of the 64-point radix-4 FFT.
//
// Runs the core at its default size on a set of frames, one per clock:
// impulses, DC, single tones, random small and full-scale frames, and
// over-driven (clipped) tones that must saturate. Every bin is compared
// exactly with the bit-true model of tb_fft_ref_pkg, and, for frames the
// model reports as unsaturated, with the double-precision DFT divided by N
// (tolerance TOL LSB). The sat flag must agree with the model. Fails if
// no frame, or every frame, saturated.
module tb_fft64_r4;
  import tb_fft_ref_pkg::*;

  localparam int N     = 64;
  localparam int RADIX = 4;
  localparam int W     = 8;
  localparam int TW_W  = 10;
  localparam real TOL  = 3.0;
  localparam real PI2  = 6.28318530717958647692;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x_re [N];
  logic signed [W-1:0] x_im [N];
  logic signed [W-1:0] y_re [N];
  logic signed [W-1:0] y_im [N];
  logic                sat;

  fft64_r4 dut (.*);

  int checks = 0, failures = 0, n_frames = 0, n_sat = 0;
  real max_err = 0.0;
  vec_t xr, xi;

  function automatic int clip8(real v);
    int i = int'($floor(v + 0.5));
    return (i > 127) ? 127 : (i < -128) ? -128 : i;
  endfunction

  task automatic run_frame(string name);
    vec_t mr, mi;
    rvec_t dr, di;
    int ns;
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      x_re[i] = W'(xr[i]);
      x_im[i] = W'(xi[i]);
    end
    @(posedge clk);
    n_frames++;
    fft_model(RADIX, N, W, TW_W, xr, xi, mr, mi, ns);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (int'(y_re[k]) != mr[k] || int'(y_im[k]) != mi[k]) begin
        failures++;
        bad++;
        if (bad < 4)
          $display("FAIL %s bin %0d: got (%0d,%0d) model (%0d,%0d)", name, k, y_re[k], y_im[k],
                   mr[k], mi[k]);
      end
    end
    checks++;
    if (sat != (ns > 0)) begin
      failures++;
      $display("FAIL %s: sat=%0b, model clamped %0d components", name, sat, ns);
    end
    if (ns > 0) n_sat++;
    else begin
      dft_ref(N, xr, xi, dr, di);
      for (int k = 0; k < N; k++) begin
        real er = real'(y_re[k]) - dr[k];
        real ei = real'(y_im[k]) - di[k];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          if (bad < 4) $display("FAIL %s bin %0d: got (%0d,%0d) dft (%f,%f)", name, k,
                                y_re[k], y_im[k], dr[k], di[k]);
          bad++;
        end
      end
    end
  endtask

  task automatic tone(int k, real amp, real ph);
    for (int i = 0; i < N; i++) begin
      xr[i] = clip8(amp * $cos(PI2 * real'(k * i % N) / real'(N) + ph));
      xi[i] = clip8(amp * $sin(PI2 * real'(k * i % N) / real'(N) + ph));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // impulses
    for (int p = 0; p < N; p += 13) begin
      for (int i = 0; i < N; i++) begin xr[i] = 0; xi[i] = 0; end
      xr[p] = 127;
      xi[p] = -128;
      run_frame("impulse");
    end
    // DC
    for (int i = 0; i < N; i++) begin xr[i] = 100; xi[i] = -50; end
    run_frame("dc");
    // tones in every bin, amplitude within range
    for (int k = 0; k < N; k++) begin
      tone(k, 120.0, 0.3 * real'(k));
      run_frame("tone");
    end
    // random frames
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < N; i++) begin
        if (t % 2 == 0) begin
          xr[i] = int'($signed(8'($urandom))) >>> 2;
          xi[i] = int'($signed(8'($urandom))) >>> 2;
        end else begin
          xr[i] = int'($signed(8'($urandom)));
          xi[i] = int'($signed(8'($urandom)));
        end
      end
      run_frame("random");
    end
    // over-driven tones: the bin exceeds the output range
    for (int k = 1; k < N; k += 7) begin
      tone(k, 200.0, 0.0);
      run_frame("clipped tone");
    end
    checks++;
    if (n_sat == 0 || n_sat == n_frames) begin
      failures++;
      $display("FAIL saturation coverage: %0d of %0d frames", n_sat, n_frames);
    end
    $display("frames=%0d saturated=%0d max_err_vs_dft=%f", n_frames, n_sat, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
