// tb_fft_ref_pkg - reference models for the FFT testbenches.
//
// dft_ref:   the DFT in double precision straight from its definition,
//            X[k] = sum_n x[n] exp(-j*2*pi*k*n/N), returned divided by N.
// fft_model: a bit-exact model of the fixed-point datapath, written as a
//            plain loop program: for each stage it forms every group's
//            twiddled inputs, takes the radix-R DFT by its defining sum
//            with (-j)^(p*q) (R = 4) or (-1)^(p*q) (R = 2), divides by R
//            with rounding to nearest (halves up) and clamps to DW bits.
//            Twiddles are round(cos * 2^F) and round(-sin * 2^F), F = TW_W-2,
//            products rounded the same way.
// Both use N <= 256.
package tb_fft_ref_pkg;

  localparam int NMAX = 256;
  localparam real PI  = 3.14159265358979323846;

  typedef int  vec_t  [NMAX];
  typedef real rvec_t [NMAX];

  function automatic void dft_ref(input int n, input vec_t xr, input vec_t xi,
                                  output rvec_t yr, output rvec_t yi);
    for (int k = 0; k < n; k++) begin
      real sr = 0.0, si = 0.0;
      for (int t = 0; t < n; t++) begin
        real ang = -2.0 * PI * real'((k * t) % n) / real'(n);
        sr += real'(xr[t]) * $cos(ang) - real'(xi[t]) * $sin(ang);
        si += real'(xr[t]) * $sin(ang) + real'(xi[t]) * $cos(ang);
      end
      yr[k] = sr / real'(n);
      yi[k] = si / real'(n);
    end
  endfunction

  function automatic int rnd(int v, int sh);
    // floor((v + 2^(sh-1)) / 2^sh)
    int num = v + (1 << (sh - 1));
    int d   = 1 << sh;
    int q   = num / d;
    if ((num % d != 0) && (num < 0)) q = q - 1;
    return q;
  endfunction

  function automatic int clamp(int v, int w, ref int nsat);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    if (v > hi) begin nsat++; return hi; end
    if (v < lo) begin nsat++; return lo; end
    return v;
  endfunction

  // radix: 2 or 4. Returns the number of clamped components in nsat.
  function automatic void fft_model(input int radix, input int n, input int dw,
                                    input int tw_w, input vec_t xr, input vec_t xi,
                                    output vec_t yr, output vec_t yi, output int nsat);
    int f = tw_w - 2;
    int rb = (radix == 4) ? 2 : 1;
    int digits = 0;
    vec_t ar, ai;
    nsat = 0;
    for (int m = 1; m < n; m = m * radix) digits++;
    // digit-reversed load
    for (int i = 0; i < n; i++) begin
      int v = i, r = 0;
      for (int d = 0; d < digits; d++) begin
        r = r * radix + (v % radix);
        v = v / radix;
      end
      ar[i] = xr[r];
      ai[i] = xi[r];
    end
    for (int len = radix; len <= n; len = len * radix) begin
      int q4 = len / radix;
      for (int g = 0; g < n / len; g++) begin
        for (int j = 0; j < q4; j++) begin
          int tr[4], ti[4];
          for (int q = 0; q < radix; q++) begin
            int idx = g * len + q * q4 + j;
            int kk  = (q * j * (n / len)) % n;
            real ang = -2.0 * PI * real'(kk) / real'(n);
            int c = int'($floor($cos(ang) * real'(1 << f) + 0.5));
            int s = int'($floor($sin(ang) * real'(1 << f) + 0.5));
            tr[q] = rnd(ar[idx] * c - ai[idx] * s, f);
            ti[q] = rnd(ar[idx] * s + ai[idx] * c, f);
          end
          for (int p = 0; p < radix; p++) begin
            int sr = 0, si = 0;
            for (int q = 0; q < radix; q++) begin
              // multiply by (-j)^(p*q) for radix 4, (-1)^(p*q) for radix 2
              int e = (radix == 4) ? ((p * q) % 4) : (2 * ((p * q) % 2));
              case (e)
                0: begin sr += tr[q]; si += ti[q]; end
                1: begin sr += ti[q]; si -= tr[q]; end
                2: begin sr -= tr[q]; si -= ti[q]; end
                default: begin sr -= ti[q]; si += tr[q]; end
              endcase
            end
            yr[g * len + p * q4 + j] = clamp(rnd(sr, rb), dw, nsat);
            yi[g * len + p * q4 + j] = clamp(rnd(si, rb), dw, nsat);
          end
        end
      end
      for (int i = 0; i < n; i++) begin
        ar[i] = yr[i];
        ai[i] = yi[i];
      end
    end
  endfunction

endpackage
