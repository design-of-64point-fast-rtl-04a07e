// tb_bfly2 - self-checking test of the radix-2 butterfly.
//
// Applies random 9-bit inputs (full range, so saturation occurs) and
// small-range inputs once per clock. Expected: (a + b)/2 and (a - b)/2,
// rounded to nearest (halves up) and clamped to 8 bits, with sat high
// exactly when a component was clamped. Fails if saturation never or
// always occurred.
module tb_bfly2;
  localparam int IW = 9;
  localparam int OW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] a_re, a_im, b_re, b_im;
  logic signed [OW-1:0] y0_re, y0_im, y1_re, y1_im;
  logic                 sat;

  bfly2 #(.IN_W(IW), .OUT_W(OW)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_vec = 0;
  bit exp_sat;

  function automatic int rs(int v, ref bit s);
    int q = (v + 1) / 2;
    if (((v + 1) % 2 != 0) && (v + 1 < 0)) q--;
    if (q > 127) begin s = 1'b1; return 127; end
    if (q < -128) begin s = 1'b1; return -128; end
    return q;
  endfunction

  task automatic check_one(logic signed [OW-1:0] got, int e, string nm);
    checks++;
    if (int'(got) != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=(%0d,%0d) b=(%0d,%0d) got %0d exp %0d", nm, a_re, a_im, b_re, b_im,
                 got, e);
    end
  endtask

  task automatic check_vec();
    int e0r, e0i, e1r, e1i;
    exp_sat = 1'b0;
    n_vec++;
    e0r = rs(int'(a_re) + int'(b_re), exp_sat);
    e0i = rs(int'(a_im) + int'(b_im), exp_sat);
    e1r = rs(int'(a_re) - int'(b_re), exp_sat);
    e1i = rs(int'(a_im) - int'(b_im), exp_sat);
    check_one(y0_re, e0r, "y0_re");
    check_one(y0_im, e0i, "y0_im");
    check_one(y1_re, e1r, "y1_re");
    check_one(y1_im, e1i, "y1_im");
    checks++;
    if (sat != exp_sat) failures++;
    if (exp_sat) n_sat++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      if (t % 2 == 0) begin
        a_re = IW'($urandom); a_im = IW'($urandom);
        b_re = IW'($urandom); b_im = IW'($urandom);
      end else begin
        a_re = IW'($signed(8'($urandom))); a_im = IW'($signed(8'($urandom)));
        b_re = IW'($signed(8'($urandom))); b_im = IW'($signed(8'($urandom)));
      end
      @(posedge clk);
      check_vec();
    end
    checks++;
    if (n_sat == 0 || n_sat == n_vec) failures++;
    $display("vectors=%0d saturated=%0d", n_vec, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
