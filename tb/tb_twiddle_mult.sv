// tb_twiddle_mult - self-checking test of twiddle_mult.
//
// Instantiates the multiplier for N = 64 and eight exponents: the four
// trivial ones (0, 16, 32, 48), which must be exact, and four general ones
// (1, 5, 13, 45). Random and extreme inputs are applied once per clock;
// each output is compared with the product computed here from the rounded
// twiddle constant (exact match) and with the unrounded complex product
// a*exp(-j*2*pi*K/64) (within 1.5 LSB).
module tb_twiddle_mult;
  localparam int N = 64;
  localparam int W = 8;
  localparam int TW_W = 10;
  localparam int NK = 8;
  localparam int KS [NK] = '{0, 16, 32, 48, 1, 5, 13, 45};
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re, a_im;
  logic signed [W:0]   y_re [NK];
  logic signed [W:0]   y_im [NK];

  for (genvar i = 0; i < NK; i++) begin : g_dut
    twiddle_mult #(.N(N), .K(KS[i]), .IN_W(W), .TW_W(TW_W)) dut (
      .a_re(a_re), .a_im(a_im), .y_re(y_re[i]), .y_im(y_im[i])
    );
  end

  int checks = 0, failures = 0;

  function automatic int fl_div(int v, int sh);
    int d = 1 << sh;
    int q = v / d;
    if ((v % d != 0) && (v < 0)) q--;
    return q;
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_one(int i);
    real ang = -2.0 * PI * real'(KS[i]) / real'(N);
    int f = TW_W - 2;
    int c = int'($floor($cos(ang) * real'(1 << f) + 0.5));
    int s = int'($floor($sin(ang) * real'(1 << f) + 0.5));
    int er = fl_div(int'(a_re) * c - int'(a_im) * s + (1 << (f - 1)), f);
    int ei = fl_div(int'(a_re) * s + int'(a_im) * c + (1 << (f - 1)), f);
    real xr = real'(a_re) * $cos(ang) - real'(a_im) * $sin(ang);
    real xi = real'(a_re) * $sin(ang) + real'(a_im) * $cos(ang);
    checks++;
    if (int'(y_re[i]) != er || int'(y_im[i]) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL K=%0d a=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", KS[i], a_re, a_im,
                 y_re[i], y_im[i], er, ei);
    end
    checks++;
    if (rabs(real'(y_re[i]) - xr) > 1.5 || rabs(real'(y_im[i]) - xi) > 1.5) begin
      failures++;
      if (failures < 10)
        $display("FAIL K=%0d a=(%0d,%0d) got (%0d,%0d) ideal (%f,%f)", KS[i], a_re, a_im,
                 y_re[i], y_im[i], xr, xi);
    end
    // trivial factors are exact
    if (KS[i] % (N / 4) == 0) begin
      checks++;
      if (rabs(real'(y_re[i]) - xr) > 1e-6 || rabs(real'(y_im[i]) - xi) > 1e-6) failures++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ext [4] = '{-128, -127, 127, 0};
    for (int e1 = 0; e1 < 4; e1++)
      for (int e2 = 0; e2 < 4; e2++) begin
        a_re = W'(ext[e1]);
        a_im = W'(ext[e2]);
        @(posedge clk);
        for (int i = 0; i < NK; i++) check_one(i);
      end
    for (int t = 0; t < 3000; t++) begin
      a_re = W'($urandom);
      a_im = W'($urandom);
      @(posedge clk);
      for (int i = 0; i < NK; i++) check_one(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
