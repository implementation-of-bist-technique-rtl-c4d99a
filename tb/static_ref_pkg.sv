// static_ref_pkg: floating-point reference for the static test, used by
// testbenches.  From a code-density histogram, the number of samples S and
// the stimulus offset C and amplitude A (in LSB) it forms the transition
// levels T[k] = C - A cos(pi CH[k-1] / S), the least-squares gain and
// offset, the DNL and INL of every code and their extremes, all in LSB.
package static_ref_pkg;

  typedef struct {
    real gain_err_pct;
    real offset;
    real dnl_min, dnl_max, inl_min, inl_max;
    real dnl[], inl[];            // per code, index k
  } static_ref_t;

  function automatic static_ref_t compute_static(input int hist[], input int n_bits,
                                          input real c, input real a);
    static_ref_t r;
    int  m, s, ch;
    real t[];
    real st, skt, st2, g, vos, v;
    m = (1 << n_bits) - 1;
    s = 0;
    foreach (hist[i]) s += hist[i];
    t = new[m + 2];
    ch = 0; st = 0; skt = 0; st2 = 0;
    for (int k = 1; k <= m; k++) begin
      ch += hist[k-1];
      t[k] = c - a * $cos(3.14159265358979 * ch / s);
      st += t[k]; skt += k * t[k]; st2 += t[k] * t[k];
    end
    g   = m * (skt - (1 << (n_bits - 1)) * st) / (m * st2 - st * st);
    vos = (1 << (n_bits - 1)) - g * st / m;
    r.gain_err_pct = (g - 1.0) * 100.0;
    r.offset  = vos;
    r.dnl = new[m + 1];
    r.inl = new[m + 1];
    r.dnl_min = 1e9;  r.dnl_max = -1e9;
    r.inl_min = 1e9;  r.inl_max = -1e9;
    for (int k = 1; k <= m; k++) begin
      v = g * t[k] + vos - k;
      r.inl[k] = v;
      if (v < r.inl_min) r.inl_min = v;
      if (v > r.inl_max) r.inl_max = v;
      if (k < m) begin
        v = g * (t[k+1] - t[k]) - 1.0;
        r.dnl[k] = v;
        if (v < r.dnl_min) r.dnl_min = v;
        if (v > r.dnl_max) r.dnl_max = v;
      end
    end
    return r;
  endfunction

endpackage
