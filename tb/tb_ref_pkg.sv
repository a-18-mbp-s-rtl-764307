// tb_ref_pkg: reference model shared by the testbenches of the turbo decoder.
//
// Everything here is written from the code definition, independently of the
// RTL's functions: the encoder is a three-stage shift register with
// feedback 1 + D^2 + D^3 and parity 1 + D + D^3, state number
// 4*r1 + 2*r2 + r3 (r1 the newest stage). Radix-4 quantities are formed by
// walking two radix-2 steps. Saturation to 9 bits and normalisation to a best
// metric of 0 mirror the fixed-point rules of the decoder so that results can
// be compared exactly.
package tb_ref_pkg;

  typedef int vec8_t [8];
  typedef int vec4_t [4];
  typedef int vec16_t [16];

  function automatic int sat9(input int v);
    if (v > 255) return 255;
    if (v < -256) return -256;
    return v;
  endfunction

  // one radix-2 encoder step
  function automatic void enc_step(input int s, input int d, output int ns, output int par);
    int r1, r2, r3, a;
    r1 = (s >> 2) & 1;
    r2 = (s >> 1) & 1;
    r3 = s & 1;
    a = d ^ r2 ^ r3;
    par = a ^ r1 ^ r3;
    ns = a * 4 + r1 * 2 + r2;
  endfunction

  // radix-4 step: pair p = 2*d2 + d1 (d1 first), returns next state and the
  // four code bits
  function automatic void enc_pair(input int s, input int p, output int ns,
                                   output int x1, output int y1, output int x2, output int y2);
    int s1;
    x1 = p & 1;
    x2 = (p >> 1) & 1;
    enc_step(s, x1, s1, y1);
    enc_step(s1, x2, ns, y2);
  endfunction

  function automatic int bm_ref(input int x1, input int y1, input int x2, input int y2,
                                input int i1, input int q1, input int i2, input int q2,
                                input int ex);
    return sat9(x1 * i1 + y1 * q1 + x2 * i2 + y2 * q2 + ex);
  endfunction

  // branch metric of pair p leaving state s
  function automatic int gamma(input vec16_t bm, input int s, input int p);
    int ns, x1, y1, x2, y2;
    enc_pair(s, p, ns, x1, y1, x2, y2);
    return bm[x1 * 8 + y1 * 4 + x2 * 2 + y2];
  endfunction

  function automatic vec8_t normalise(input vec8_t v);
    int top;
    vec8_t r;
    top = v[0];
    for (int m = 1; m < 8; m++) if (v[m] > top) top = v[m];
    for (int m = 0; m < 8; m++) r[m] = sat9(v[m] - top);
    return r;
  endfunction

  function automatic vec8_t fwd_step(input vec8_t a, input vec16_t bm);
    vec8_t r;
    int ns, x1, y1, x2, y2;
    for (int m = 0; m < 8; m++) r[m] = -100000;
    for (int s = 0; s < 8; s++)
      for (int p = 0; p < 4; p++) begin
        enc_pair(s, p, ns, x1, y1, x2, y2);
        if (a[s] + gamma(bm, s, p) > r[ns]) r[ns] = a[s] + gamma(bm, s, p);
      end
    return normalise(r);
  endfunction

  function automatic vec8_t bwd_step(input vec8_t b, input vec16_t bm);
    vec8_t r;
    int ns, x1, y1, x2, y2;
    for (int s = 0; s < 8; s++) begin
      r[s] = -100000;
      for (int p = 0; p < 4; p++) begin
        enc_pair(s, p, ns, x1, y1, x2, y2);
        if (b[ns] + gamma(bm, s, p) > r[s]) r[s] = b[ns] + gamma(bm, s, p);
      end
    end
    return normalise(r);
  endfunction

  // LLRs relative to pair 0 (saturated) and the hard decision
  function automatic void llr_ref(input vec8_t a, input vec8_t b, input vec16_t bm,
                                  output vec4_t llr, output int dec);
    int lam [4];
    int ns, x1, y1, x2, y2, top;
    for (int p = 0; p < 4; p++) begin
      lam[p] = -100000;
      for (int s = 0; s < 8; s++) begin
        enc_pair(s, p, ns, x1, y1, x2, y2);
        if (a[s] + gamma(bm, s, p) + b[ns] > lam[p]) lam[p] = a[s] + gamma(bm, s, p) + b[ns];
      end
    end
    dec = 0;
    top = lam[0];
    for (int p = 1; p < 4; p++) if (lam[p] > top) begin top = lam[p]; dec = p; end
    for (int p = 0; p < 4; p++) llr[p] = sat9(lam[p] - lam[0]);
  endfunction

  function automatic vec16_t bm_vec(input int i1, input int i2, input int q1, input int q2,
                                    input vec4_t ex, input bit apr);
    vec16_t r;
    for (int c = 0; c < 16; c++) begin
      int x1, y1, x2, y2;
      x1 = (c >> 3) & 1; y1 = (c >> 2) & 1; x2 = (c >> 1) & 1; y2 = c & 1;
      r[c] = bm_ref(x1, y1, x2, y2, i1, q1, i2, q2, apr ? ex[x2 * 2 + x1] : 0);
    end
    return r;
  endfunction

  // signed random sample in [-lim, lim]
  function automatic int srand(input int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  // ---------------------------------------------------------------------
  // Turbo encoder, rate-1/2 puncturing and channel for whole blocks.
  // Symbol k is the pair (data[2k], data[2k+1]). Encoder 1 takes the symbols
  // in natural order and is terminated in state 0 by the last three bits;
  // encoder 2 takes symbol (ila*j + ilb) mod ns at its step j. Encoder 1's
  // parity of the first bit and encoder 2's parity of the second bit are sent;
  // the others are punctured (sample 0). Samples are +/-amp plus noise of
  // standard deviation sigma_x100/100, clipped to 8 bits. samp[k] holds
  // {i1, i2, p1a, p1b, p2a, p2b} of natural symbol k, p2* belonging to the
  // encoder-2 step that took symbol k. Returns the raw systematic errors.
  typedef int samp6_t [6];

  function automatic int gauss(input int sigma_x100);
    int acc;
    acc = 0;
    for (int i = 0; i < 12; i++) acc += int'($urandom_range(2000)) - 1000;
    return (acc * sigma_x100) / 200000;      // acc has standard deviation 2000
  endfunction

  function automatic int channel(input int bit_v, input int amp, input int sigma_x100);
    int v;
    v = (bit_v ? amp : -amp) + ((sigma_x100 > 0) ? gauss(sigma_x100) : 0);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  function automatic int make_block(input int n, input int ila, input int ilb, input int amp,
                                    input int sigma_x100, ref int data [], ref samp6_t samp []);
    int s, ns, par, errs, nsym;
    int y1 [], z2 [];
    nsym = n / 2;
    data = new[n];
    samp = new[nsym];
    y1 = new[nsym];
    z2 = new[nsym];
    s = 0;
    for (int k = 0; k < n; k++) begin
      if (k >= n - 3) data[k] = ((s >> 1) & 1) ^ (s & 1);
      else data[k] = $urandom_range(1);
      enc_step(s, data[k], ns, par);
      if (k % 2 == 0) y1[k / 2] = par;
      s = ns;
    end
    s = 0;
    for (int j = 0; j < nsym; j++) begin
      int k;
      k = (ila * j + ilb) % nsym;
      enc_step(s, data[2 * k], ns, par);     s = ns;
      enc_step(s, data[2 * k + 1], ns, par); s = ns;
      z2[k] = par;
    end
    errs = 0;
    for (int k = 0; k < nsym; k++) begin
      samp[k][0] = channel(data[2 * k], amp, sigma_x100);
      samp[k][1] = channel(data[2 * k + 1], amp, sigma_x100);
      samp[k][2] = channel(y1[k], amp, sigma_x100);
      samp[k][3] = 0;
      samp[k][4] = 0;
      samp[k][5] = channel(z2[k], amp, sigma_x100);
      if ((samp[k][0] > 0) != (data[2 * k] == 1)) errs++;
      if ((samp[k][1] > 0) != (data[2 * k + 1] == 1)) errs++;
    end
    return errs;
  endfunction

endpackage
