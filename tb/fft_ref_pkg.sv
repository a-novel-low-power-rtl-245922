// fft_ref_pkg: reference models used by the testbenches. They compute what
// the hardware should produce straight from the radix-4 decomposition, on
// whole arrays, without any of the hardware's timing or structure:
//   - quantized twiddle factors, floor(value * 32768) saturated to 7fff;
//   - one radix-4 stage: exact four-term sums, divide by 4 (floor), then the
//     twiddle product with 15 fraction bits dropped (floor), truncated to
//     16 bits; in a 16-word stage (the multiplier-less one) the coefficients
//     (1,0) and (0,-1) are applied exactly, as the hardware passes or swaps
//     the word instead of multiplying;
//   - the full transform, returned in natural frequency order;
//   - a floating point DFT for a tolerance check of the fixed point result.
package fft_ref_pkg;

  typedef struct {
    int re;
    int im;
  } ci_t;

  function automatic int wrap16(input longint v);
    logic [15:0] t;
    t = 16'(v);
    return int'($signed(t));
  endfunction

  function automatic int floor_shr(input longint v, input int sh);
    return int'(v >>> sh);
  endfunction

  function automatic int qcoef(input real v);
    real f;
    f = $floor(v * 32768.0);
    if (f > 32767.0) f = 32767.0;
    return int'(f);
  endfunction

  function automatic ci_t twiddle(input int k, input int nb);
    ci_t w;
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(nb);
    w.re = qcoef($cos(a));
    w.im = qcoef(-$sin(a));
    return w;
  endfunction

  // x * (-j)^r, exact
  function automatic ci_t rot(input ci_t x, input int r);
    ci_t y;
    case (r % 4)
      0: y = x;
      1: begin y.re = x.im;  y.im = -x.re; end
      2: begin y.re = -x.re; y.im = -x.im; end
      default: begin y.re = -x.im; y.im = x.re; end
    endcase
    return y;
  endfunction

  // radix-4 butterfly output m of operands a[0..3], divided by 4
  function automatic ci_t bfly(input ci_t a [4], input int m);
    longint sr, si;
    ci_t t;
    sr = 0; si = 0;
    for (int p = 0; p < 4; p++) begin
      t = rot(a[p], p * m);
      sr += t.re;
      si += t.im;
    end
    t.re = floor_shr(sr, 2);
    t.im = floor_shr(si, 2);
    return t;
  endfunction

  function automatic ci_t cmul(input ci_t x, input ci_t w);
    ci_t y;
    longint yr, yi;
    yr = longint'(x.re) * w.re - longint'(x.im) * w.im;
    yi = longint'(x.re) * w.im + longint'(x.im) * w.re;
    y.re = wrap16(yr >>> 15);
    y.im = wrap16(yi >>> 15);
    return y;
  endfunction

  // one stage on every block of size nb of data[]; mult: 0 none, 1 ROM, 2 mless
  function automatic void stage(ref ci_t data [], input int nb, input int mult);
    ci_t out [];
    ci_t a [4];
    ci_t y;
    int nt, k;
    nt = nb / 4;
    out = new[data.size()];
    for (int o = 0; o < data.size(); o += nb)
      for (int m = 0; m < 4; m++)
        for (int q = 0; q < nt; q++) begin
          for (int p = 0; p < 4; p++) a[p] = data[o + p*nt + q];
          y = bfly(a, m);
          k = q * m;
          if (mult == 1) y = cmul(y, twiddle(k, nb));
          else if (mult == 2) begin
            if (k == 4) begin
              int t;
              t = y.re;
              y.re = y.im;
              y.im = wrap16(-longint'(t));
            end else if (k != 0) y = cmul(y, twiddle(k, nb));
          end
          out[o + m*nt + q] = y;
        end
    data = out;
  endfunction

  function automatic int digit_rev4(input int s, input int n);
    int r, v;
    r = 0;
    v = 1;
    while (v < n) begin
      r = r * 4 + (s % 4);
      s = s / 4;
      v = v * 4;
    end
    return r;
  endfunction

  // full fixed point transform; result in natural order X[k]
  function automatic void fft(input ci_t x [], output ci_t X []);
    ci_t d [];
    int n, nb;
    n = x.size();
    d = x;
    nb = n;
    while (nb >= 4) begin
      int mk;
      if (nb == 4)       mk = 0;
      else if (nb == 16) mk = 2;
      else               mk = 1;
      stage(d, nb, mk);
      nb = nb / 4;
    end
    X = new[n];
    for (int s = 0; s < n; s++) X[digit_rev4(s, n)] = d[s];
  endfunction

  // floating point DFT / n of the same input
  function automatic void dft(input ci_t x [], output real xr [], output real xi []);
    int n;
    real a;
    n = x.size();
    xr = new[n];
    xi = new[n];
    for (int k = 0; k < n; k++) begin
      xr[k] = 0.0;
      xi[k] = 0.0;
      for (int i = 0; i < n; i++) begin
        a = -2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
        xr[k] += real'(x[i].re) * $cos(a) - real'(x[i].im) * $sin(a);
        xi[k] += real'(x[i].re) * $sin(a) + real'(x[i].im) * $cos(a);
      end
      xr[k] /= real'(n);
      xi[k] /= real'(n);
    end
  endfunction

endpackage
