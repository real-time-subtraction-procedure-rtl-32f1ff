// Reference model of the PLI remover for the testbenches, written in plain
// integer arithmetic on 64-bit numbers, independent of the RTL structure.
// Samples are Q16 numbers in 32-bit words (1.0 = 65536).
package tb_ref_pkg;

  localparam int FRAC = 16;
  localparam longint ONE  = 64'd1 << FRAC;
  localparam longint K500 = (ONE + 250) / 500;   // 1/500
  localparam longint K01  = (ONE + 5) / 10;      // 0.1
  localparam longint SMAX = (64'd1 << 31) - 1;

  // a*b rescaled, rounded towards minus infinity like an arithmetic shift
  function automatic longint fxmul(longint a, longint b);
    longint p;
    p = a * b;
    return (p >= 0) ? (p / ONE) : -((-p + ONE - 1) / ONE);
  endfunction

  function automatic longint labs(longint a);
    return (a < 0) ? -a : a;
  endfunction

  typedef struct {
    longint mmax, mmin, mpp, mmu, m;
  } thr_t;

  function automatic thr_t thr_reset();
    thr_t t;
    t.mmax = 0; t.mmin = 0; t.mpp = 0; t.mmu = 0; t.m = 0;
    return t;
  endfunction

  // one threshold update for a new sample x
  function automatic thr_t thr_step(thr_t t, longint x);
    thr_t n;
    if (x > t.mmax) n.mmax = x;
    else            n.mmax = t.mmax - fxmul(labs(t.mmax - x), K500);
    if (x < t.mmin) n.mmin = x;
    else            n.mmin = t.mmin + fxmul(labs(x - t.mmin), K500);
    n.mpp = n.mmax - n.mmin;
    if (t.mmu > n.mpp) n.mmu = n.mpp;
    else               n.mmu = t.mmu + fxmul(labs(n.mpp), K500);
    n.m = fxmul(n.mmu, K01);
    return n;
  endfunction

  // The whole subtraction procedure. x[0] is sample 1; results indexed the
  // same way (iteration j at index j-1) describe sample j-n.
  function automatic void run_ref(input longint x[$], input int n,
                                  output longint y[$], output longint pli[$],
                                  output bit cr[$], output longint dabs[$],
                                  output longint thr[$]);
    thr_t t;
    int   h;
    longint d, s, lin, nl;
    y = {}; pli = {}; cr = {}; dabs = {}; thr = {};
    t = thr_reset();
    h = (n - 1) / 2;
    for (int j = 0; j < x.size(); j++) begin
      t = thr_step(t, x[j]);
      d = xs(x, j - 2*n) - 2 * xs(x, j - n) + x[j];
      d = labs(d);
      if (d > SMAX) d = SMAX;
      dabs.push_back(d);
      thr.push_back(t.m);
      cr.push_back(d < t.m);
      s = 0;
      for (int k = j - n - h; k <= j - n + h; k++) s += xs(x, k);
      lin = xs(x, j - n) - s / longint'(n);
      nl  = (j - n >= 0) ? pli[j - n] : 0;
      pli.push_back(cr[j] ? lin : nl);
      y.push_back(xs(x, j - n) - pli[j]);
    end
  endfunction

  // linear-segment interference estimate of iteration j (0-based)
  function automatic longint lin_at(longint x[$], int n, int j);
    longint s;
    int h;
    h = (n - 1) / 2;
    s = 0;
    for (int k = j - n - h; k <= j - n + h; k++) s += xs(x, k);
    return xs(x, j - n) - s / longint'(n);
  endfunction

  function automatic longint xs(longint x[$], int k);
    return (k >= 0 && k < x.size()) ? x[k] : 0;
  endfunction

  // Synthetic ECG in Q16 millivolts: heart beats every `period` samples
  // (a sharp QRS and a broad T wave), slow baseline wander, and a
  // power-line sine with n samples per cycle. `clean` gets the ECG alone.
  function automatic void make_ecg(input int len, input int n, input int period,
                                   input real pli_amp,
                                   output longint x[$], output longint clean[$]);
    real pi, e, p;
    int  ph;
    pi = 3.14159265358979;
    x = {}; clean = {};
    for (int j = 0; j < len; j++) begin
      ph = j % period;
      e = 0.05 * $sin(2.0 * pi * j / (7.3 * period));
      if (ph >= 40 && ph < 46)      e += 1.0 * (ph - 40) / 5.0;
      else if (ph >= 46 && ph < 52) e += 1.0 - 1.3 * (ph - 46) / 5.0;
      else if (ph >= 52 && ph < 56) e += -0.3 + 0.3 * (ph - 52) / 4.0;
      if (ph >= 90 && ph < 130)     e += 0.2 * $sin(pi * (ph - 90) / 40.0);
      p = pli_amp * $sin(2.0 * pi * j / n + 0.4);
      clean.push_back(longint'($rtoi(e * ONE)));
      x.push_back(longint'($rtoi((e + p) * ONE)));
    end
  endfunction

endpackage
