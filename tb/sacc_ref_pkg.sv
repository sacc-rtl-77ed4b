// sacc_ref_pkg: stimulus and golden model for the SACC accelerator tests.
//
// Off-chip contents are not stored: every 16-bit word is a pseudo-random
// value in [-amp, amp] computed from its word address (word_val), so the
// memory model and the golden model agree without a table. lstm_ref_step
// computes one LSTM time step the straightforward way (full R.h each step)
// in the same fixed-point format as the hardware: Q8.8 data, 32-bit
// wrapping accumulation, >>> 8 and saturation to 16 bits before the
// activations, PLAN sigmoid and tanh(x) = 2*sigm(2x) - 1.
package sacc_ref_pkg;

  function automatic int word_val(longint unsigned widx, int amp);
    longint unsigned h;
    h = widx * 64'h9E3779B97F4A7C15;
    h = h ^ (h >> 29);
    h = h * 64'hBF58476D1CE4E5B9;
    h = h ^ (h >> 32);
    return int'(h % longint'(2 * amp + 1)) - amp;
  endfunction

  function automatic int val_at(longint unsigned byte_addr, int amp);
    return word_val(byte_addr >> 1, amp);
  endfunction

  function automatic int sat16(int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic int mulq(int a, int b);
    return sat16((a * b) >>> 8);
  endfunction

  function automatic int ref_sigm(int x);
    int ax, y;
    ax = (x < 0) ? -x : x;
    if (ax >= 1280)      y = 256;
    else if (ax >= 608)  y = 216 + ax / 32;
    else if (ax >= 256)  y = 160 + ax / 8;
    else                 y = 128 + ax / 4;
    return (x < 0) ? 256 - y : y;
  endfunction

  function automatic int ref_tanh(int x);
    return 2 * ref_sigm(sat16(2 * x)) - 256;
  endfunction

  // byte addresses of the blocked layout
  function automatic longint unsigned w_addr(longint unsigned base, int N, int L, int B,
                                             int g, int n, int l);
    int r, kk, mx, j;
    r = n / B; kk = n % B; mx = l / B; j = l % B;
    return base + longint'(r * ((L + B - 1) / B) + mx) * 8 * B * B + 2 * ((g * B + kk) * B + j);
  endfunction

  function automatic longint unsigned b_addr(longint unsigned base, int B, int g, int n);
    return base + longint'(n / B) * 8 * B + 2 * (g * B + n % B);
  endfunction

  // One reference time step with the input vector given: h, c updated in place.
  function automatic void lstm_ref_step_x(int N, int L, int B,
                                          longint unsigned wb, longint unsigned rb,
                                          longint unsigned bb, int amp, const ref int x [],
                                          ref int h [], ref int c []);
    int hn [];
    int pre [4];
    int acc;
    hn = new[N];
    for (int n = 0; n < N; n++) begin
      for (int g = 0; g < 4; g++) begin
        acc = val_at(b_addr(bb, B, g, n), amp) <<< 8;
        for (int l = 0; l < L; l++) acc += val_at(w_addr(wb, N, L, B, g, n, l), amp) * x[l];
        for (int k = 0; k < N; k++) acc += val_at(w_addr(rb, N, N, B, g, n, k), amp) * h[k];
        pre[g] = sat16(acc >>> 8);
      end
      begin
        int gi, gf, gg, go;
        gi = ref_sigm(pre[0]);
        gf = ref_sigm(pre[1]);
        gg = ref_tanh(pre[2]);
        go = ref_sigm(pre[3]);
        c[n]  = sat16(mulq(gf, c[n]) + mulq(gi, gg));
        hn[n] = mulq(go, ref_tanh(c[n]));
      end
    end
    for (int n = 0; n < N; n++) h[n] = hn[n];
  endfunction

  // One reference time step with x read from the pseudo-random memory.
  function automatic void lstm_ref_step(int N, int L, int B,
                                        longint unsigned wb, longint unsigned rb,
                                        longint unsigned bb, longint unsigned xa, int amp,
                                        ref int h [], ref int c []);
    int x [];
    x = new[L];
    for (int l = 0; l < L; l++) x[l] = val_at(xa + 2 * l, amp);
    lstm_ref_step_x(N, L, B, wb, rb, bb, amp, x, h, c);
  endfunction

endpackage
