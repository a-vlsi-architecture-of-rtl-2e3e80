// Reference models for the systolic FFT testbenches.
//
// Everything here is computed from closed formulas, independently of the RTL's
// bit-serial distributed arithmetic:
//   hba_ref    (A*128 +- B*W) / 256 with W = (C1+C2) + j(C1-C2), floor, saturated
//   coef_ref   the coefficient pair (Wr+Wi)/2, (Wr-Wi)/2 of process q at index k,
//              rounded to Q1.7, for W = exp(-j 2 pi p / NPTS),
//              p = bitrev_{q-1}(k >> (L-q+1)) * 2^(L-q), L = log2(NPTS)
//   fft_ref    the whole array, process by process, with hba_ref
//   bist_ref   the self-test signature of one PE
package fft_ref_pkg;

  typedef struct {
    int re;
    int im;
  } ci_t;

  function automatic int sat8(input int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int sx8(input logic [7:0] v);
    return int'($signed(v));
  endfunction

  // Floor division by 2^s of a signed int.
  function automatic int floor_sh(input int v, input int s);
    return v >>> s;
  endfunction

  function automatic ci_t hba_ref(input ci_t a, input ci_t b, input int c1, input int c2,
                                  input bit plus);
    int wr, wi, pr, pi;
    ci_t r;
    wr = c1 + c2;
    wi = c1 - c2;
    pr = b.re * wr - b.im * wi;
    pi = b.re * wi + b.im * wr;
    if (plus) begin
      r.re = sat8(floor_sh(a.re * 128 + pr, 8));
      r.im = sat8(floor_sh(a.im * 128 + pi, 8));
    end else begin
      r.re = sat8(floor_sh(a.re * 128 - pr, 8));
      r.im = sat8(floor_sh(a.im * 128 - pi, 8));
    end
    return r;
  endfunction

  function automatic int bitrev(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic int rnd_q7(input real x);
    int v;
    v = $rtoi(x * 128.0 + ((x >= 0.0) ? 0.5 : -0.5));
    return sat8(v);
  endfunction

  // Returns {c1, c2} packed into two ints through the output arguments.
  function automatic void coef_ref(input int q, input int k, input int l,
                                   output int c1, output int c2);
    int  h, g, p;
    real th, wr, wi;
    h  = 1 << (l - q);
    g  = k >> (l - q + 1);
    p  = bitrev(g, q - 1) * h;
    th = 2.0 * 3.14159265358979323846 * real'(p) / real'(1 << l);
    wr = $cos(th);
    wi = -$sin(th);
    c1 = rnd_q7((wr + wi) / 2.0);
    c2 = rnd_q7((wr - wi) / 2.0);
  endfunction

  // Whole transform as the array computes it, in place, natural PE order.
  function automatic void fft_ref(ref ci_t f[], input int l);
    ci_t nf[];
    int  n, h, c1, c2;
    n  = 1 << l;
    nf = new[n];
    for (int q = 1; q <= l; q++) begin
      h = 1 << (l - q);
      for (int k = 0; k < n; k++) begin
        coef_ref(q, k, l, c1, c2);
        if (q == 1) begin c1 = 64; c2 = 64; end
        if ((k & h) == 0) nf[k] = hba_ref(f[k], f[k + h], c1, c2, 1'b1);
        else              nf[k] = hba_ref(f[k - h], f[k], c1, c2, 1'b0);
      end
      f = nf;
      nf = new[n];
    end
  endfunction

  // Largest distance, in LSBs, between the array result and DFT(x)/n computed
  // in floating point; the array's output index k holds X(bitrev(k)).
  function automatic real dft_err(ref ci_t x[], ref ci_t y[], input int l);
    int  n;
    real err, sr, si, th, e;
    n   = 1 << l;
    err = 0.0;
    for (int k = 0; k < n; k++) begin
      int kk;
      kk = bitrev(k, l);
      sr = 0.0;
      si = 0.0;
      for (int t = 0; t < n; t++) begin
        th = -2.0 * 3.14159265358979323846 * real'(kk * t % n) / real'(n);
        sr += real'(x[t].re) * $cos(th) - real'(x[t].im) * $sin(th);
        si += real'(x[t].re) * $sin(th) + real'(x[t].im) * $cos(th);
      end
      sr /= real'(n);
      si /= real'(n);
      e = (real'(y[k].re) - sr);
      if (e < 0.0) e = -e;
      if (e > err) err = e;
      e = (real'(y[k].im) - si);
      if (e < 0.0) e = -e;
      if (e > err) err = e;
    end
    return err;
  endfunction

  function automatic logic [15:0] lfsr16(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  function automatic logic [8:0] misr9(input logic [8:0] s, input logic [15:0] d);
    return {s[7:0], s[8] ^ s[4]} ^ (d[8:0] ^ {2'b00, d[15:9]});
  endfunction

  // Signature of the self test: A fixed, B and the coefficient pair stepped as
  // LFSRs after each pattern, HBA+ for even and HBA- for odd patterns.
  function automatic logic [8:0] bist_ref(input logic [15:0] a_w, input logic [15:0] b_w,
                                          input logic [15:0] c_w, input int npat);
    logic [8:0]  sig = '0;
    logic [15:0] b = b_w, c = c_w;
    ci_t a, bb, r;
    a.re = sx8(a_w[15:8]);
    a.im = sx8(a_w[7:0]);
    for (int i = 0; i < npat; i++) begin
      bb.re = sx8(b[15:8]);
      bb.im = sx8(b[7:0]);
      r = hba_ref(a, bb, sx8(c[15:8]), sx8(c[7:0]), (i % 2) == 0);
      sig = misr9(sig, {r.re[7:0], r.im[7:0]});
      b = lfsr16(b);
      c = lfsr16(c);
    end
    return sig;
  endfunction

endpackage
