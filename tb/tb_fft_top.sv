// tb_fft_top - end-to-end test of fft_top at its default sizes.
//
// Both processors run side by side: each clock a new 64-sample frame goes
// to the radix-4 FFT and a new 32-sample frame to the radix-2 FFT. Frames
// are tones, DC, impulses, random data and over-driven tones. Every bin of
// both is compared exactly with the bit-true model of tb_fft_ref_pkg, and
// unsaturated frames also with the double-precision DFT divided by N.
// Counted mechanisms, each of which must occur at least once per
// processor: frames transformed without saturation, frames in which a
// butterfly saturated, and frames whose result needed a non-trivial
// twiddle (a tone off bin 0 and N/4 multiples, checked against the DFT).
module tb_fft_top;
  import tb_fft_ref_pkg::*;

  localparam int N4   = 64;
  localparam int N2   = 32;
  localparam int W    = 8;
  localparam int TW_W = 10;
  localparam real TOL = 3.0;
  localparam real PI2 = 6.28318530717958647692;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] r4_x_re [N4];
  logic signed [W-1:0] r4_x_im [N4];
  logic signed [W-1:0] r4_y_re [N4];
  logic signed [W-1:0] r4_y_im [N4];
  logic                r4_sat;
  logic signed [W-1:0] r2_x_re [N2];
  logic signed [W-1:0] r2_x_im [N2];
  logic signed [W-1:0] r2_y_re [N2];
  logic signed [W-1:0] r2_y_im [N2];
  logic                r2_sat;

  fft_top dut (.*);

  int checks = 0, failures = 0;
  int frames [2] = '{0, 0};
  int clean  [2] = '{0, 0};
  int satd   [2] = '{0, 0};
  int rotd   [2] = '{0, 0};
  vec_t ar, ai, br, bi;

  function automatic int clip8(real v);
    int i = int'($floor(v + 0.5));
    return (i > 127) ? 127 : (i < -128) ? -128 : i;
  endfunction

  function automatic void make_frame(int kind, int n, int t, ref vec_t xr, ref vec_t xi);
    int k = (t * 5 + 3) % n;
    real amp = (kind == 4) ? 210.0 : 110.0;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: begin xr[i] = 90; xi[i] = -70; end                           // DC
        1: begin xr[i] = (i == t % n) ? 127 : 0; xi[i] = 0; end         // impulse
        2, 4: begin                                                     // tone
          xr[i] = clip8(amp * $cos(PI2 * real'(k * i % n) / real'(n)));
          xi[i] = clip8(amp * $sin(PI2 * real'(k * i % n) / real'(n)));
        end
        default: begin                                                  // random
          xr[i] = int'($signed(8'($urandom)));
          xi[i] = int'($signed(8'($urandom)));
        end
      endcase
    end
  endfunction

  // compare one processor's outputs with the model and the DFT
  task automatic check(int which, int n, int radix, bit nontrivial, vec_t xr, vec_t xi,
                       vec_t yr, vec_t yi, bit s);
    vec_t mr, mi;
    rvec_t dr, di;
    int ns;
    int bad = 0;
    frames[which]++;
    fft_model(radix, n, W, TW_W, xr, xi, mr, mi, ns);
    for (int k = 0; k < n; k++) begin
      checks++;
      if (yr[k] != mr[k] || yi[k] != mi[k]) begin
        failures++;
        if (bad++ < 3) $display("FAIL radix-%0d bin %0d: got (%0d,%0d) model (%0d,%0d)", radix,
                                k, yr[k], yi[k], mr[k], mi[k]);
      end
    end
    checks++;
    if (s != (ns > 0)) failures++;
    if (ns > 0) satd[which]++;
    else begin
      clean[which]++;
      dft_ref(n, xr, xi, dr, di);
      for (int k = 0; k < n; k++) begin
        checks++;
        if (real'(yr[k]) - dr[k] > TOL || dr[k] - real'(yr[k]) > TOL ||
            real'(yi[k]) - di[k] > TOL || di[k] - real'(yi[k]) > TOL) begin
          failures++;
          if (bad++ < 3) $display("FAIL radix-%0d bin %0d vs DFT", radix, k);
        end
      end
      if (nontrivial) rotd[which]++;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      automatic int kind = t % 5;
      automatic vec_t yr, yi, zr, zi;
      make_frame(kind, N4, t, ar, ai);
      make_frame((kind + 2) % 5, N2, t, br, bi);
      for (int i = 0; i < N4; i++) begin r4_x_re[i] = W'(ar[i]); r4_x_im[i] = W'(ai[i]); end
      for (int i = 0; i < N2; i++) begin r2_x_re[i] = W'(br[i]); r2_x_im[i] = W'(bi[i]); end
      @(posedge clk);
      for (int i = 0; i < N4; i++) begin yr[i] = int'(r4_y_re[i]); yi[i] = int'(r4_y_im[i]); end
      for (int i = 0; i < N2; i++) begin zr[i] = int'(r2_y_re[i]); zi[i] = int'(r2_y_im[i]); end
      check(0, N4, 4, (kind == 2) && (((t * 5 + 3) % (N4 / 4)) != 0), ar, ai, yr, yi, r4_sat);
      check(1, N2, 2, (((kind + 2) % 5) == 2) && (((t * 5 + 3) % (N2 / 4)) != 0), br, bi, zr,
            zi, r2_sat);
    end
    for (int p = 0; p < 2; p++) begin
      $display("%s: frames=%0d unsaturated=%0d saturated=%0d nontrivial-twiddle tones=%0d",
               (p == 0) ? "radix-4 64-point" : "radix-2 32-point", frames[p], clean[p], satd[p],
               rotd[p]);
      checks += 3;
      if (clean[p] == 0) failures++;
      if (satd[p] == 0) failures++;
      if (rotd[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
