// dyn_ref_pkg: floating-point reference for the dynamic test, used by
// testbenches.  From a record of signed samples it takes the DFT, finds
// the largest non-DC bin in 1 .. N/2 as the fundamental, folds the
// harmonics 2 .. nh+1 about Nyquist, and returns THD, SNR, SINAD, SFDR
// (dB) and ENOB as the self-test defines them.
package dyn_ref_pkg;

  typedef struct {
    int  fund_bin;
    real thd, snr, sinad, sfdr, enob;
  } dyn_ref_t;

  function automatic dyn_ref_t compute_dynamic(input int x[], input int nh);
    dyn_ref_t r;
    int  n, kf, b;
    real pw[];
    bit  harm[];
    real ps, ph, pn, pspur, er, ei;
    n = x.size();
    pw = new[n / 2 + 1];
    harm = new[n / 2 + 1];
    kf = 1;
    for (int k = 1; k <= n / 2; k++) begin
      er = 0; ei = 0;
      for (int i = 0; i < n; i++) begin
        er += x[i] * $cos(2.0 * 3.14159265358979 * ((k * i) % n) / n);
        ei -= x[i] * $sin(2.0 * 3.14159265358979 * ((k * i) % n) / n);
      end
      pw[k] = er * er + ei * ei;
      if (pw[k] > pw[kf]) kf = k;
      harm[k] = 0;
    end
    for (int h = 2; h <= nh + 1; h++) begin
      b = (h * kf) % n;
      if (b > n / 2) b = n - b;
      harm[b] = 1;
    end
    ps = pw[kf]; ph = 0; pn = 0; pspur = 0;
    for (int k = 1; k <= n / 2; k++) begin
      if (k == kf) continue;
      if (harm[k]) ph += pw[k]; else pn += pw[k];
      if (pw[k] > pspur) pspur = pw[k];
    end
    if (ph < 1.0) ph = 1.0;
    r.fund_bin = kf;
    r.thd   = 10.0 * $log10(ps / ph);
    r.snr   = 10.0 * $log10(ps / pn);
    r.sinad = 10.0 * $log10(ps / (pn + ph));
    r.sfdr  = 10.0 * $log10(ps / pspur);
    r.enob  = (r.sinad - 1.76) / 6.02;
    return r;
  endfunction

endpackage
