// tb_bfly4 - self-checking test of the radix-4 butterfly.
//
// Applies random 9-bit inputs (full range, so saturation occurs) and
// small-range inputs (no saturation) once per clock. The expected outputs
// are the length-4 DFT from its definition, y_p = sum_q x_q * (-j)^(p*q),
// divided by 4 with rounding to nearest (halves up) and clamped to 8 bits;
// the sat flag must be high exactly when a component was clamped. Counts
// how many vectors saturated and fails if none or all did.
module tb_bfly4;
  localparam int IW = 9;
  localparam int OW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] x_re [4];
  logic signed [IW-1:0] x_im [4];
  logic signed [OW-1:0] y_re [4];
  logic signed [OW-1:0] y_im [4];
  logic                 sat;

  bfly4 #(.IN_W(IW), .OUT_W(OW)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_vec = 0;

  function automatic int rnd4(int v);
    int q = (v + 2) / 4;
    if (((v + 2) % 4 != 0) && (v + 2 < 0)) q--;
    return q;
  endfunction

  task automatic check_vec();
    bit exp_sat = 1'b0;
    n_vec++;
    for (int p = 0; p < 4; p++) begin
      int sr = 0, si = 0;
      int er, ei;
      for (int q = 0; q < 4; q++) begin
        case ((p * q) % 4)
          0: begin sr += int'(x_re[q]); si += int'(x_im[q]); end
          1: begin sr += int'(x_im[q]); si -= int'(x_re[q]); end   // -j
          2: begin sr -= int'(x_re[q]); si -= int'(x_im[q]); end   // -1
          default: begin sr -= int'(x_im[q]); si += int'(x_re[q]); end // +j
        endcase
      end
      er = rnd4(sr);
      ei = rnd4(si);
      if (er > 127 || er < -128 || ei > 127 || ei < -128) exp_sat = 1'b1;
      er = (er > 127) ? 127 : (er < -128) ? -128 : er;
      ei = (ei > 127) ? 127 : (ei < -128) ? -128 : ei;
      checks++;
      if (int'(y_re[p]) != er || int'(y_im[p]) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%0d got (%0d,%0d) exp (%0d,%0d)", p, y_re[p], y_im[p], er, ei);
      end
    end
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
    // all-extreme corners
    for (int v = 0; v < 4; v++) begin
      for (int q = 0; q < 4; q++) begin
        x_re[q] = (v[0]) ? IW'(255) : IW'(-256);
        x_im[q] = (v[1]) ? IW'(-256) : IW'(255);
      end
      @(posedge clk);
      check_vec();
    end
    for (int t = 0; t < 4000; t++) begin
      for (int q = 0; q < 4; q++) begin
        if (t % 2 == 0) begin
          x_re[q] = IW'($urandom);
          x_im[q] = IW'($urandom);
        end else begin
          x_re[q] = IW'($signed(8'($urandom)) >>> 1);
          x_im[q] = IW'($signed(8'($urandom)) >>> 1);
        end
      end
      @(posedge clk);
      check_vec();
    end
    checks++;
    if (n_sat == 0 || n_sat == n_vec) begin
      failures++;
      $display("FAIL saturation coverage: %0d of %0d", n_sat, n_vec);
    end
    $display("vectors=%0d saturated=%0d", n_vec, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
