// ecg_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL, as plain loops over whole arrays:
//  - synth_ecg: a synthetic ECG (sum of Gaussian P, Q, R, S, T waves per
//    beat) for a given heart period and first R-peak position;
//  - haar_ref: unscaled Haar details at levels 3 and 5;
//  - bd_ref:   the boundary-detection procedure (sub-frame maxima, 60 %
//    threshold with the 154/256 constant, run/gap rules, +-10 minimum,
//    R-peak, boundaries);
//  - fe_ref:   the feature-extraction procedure for one beat.
package ecg_ref_pkg;

  localparam int NF  = 4096;
  localparam int NF3 = NF / 8;
  localparam int NF5 = NF / 32;

  typedef int ecg_arr_t [NF];
  typedef int cd3_arr_t [NF3];
  typedef int cd5_arr_t [NF5];

  typedef struct {
    int n;
    int r   [7];
    int rv  [7];
    int t1  [7];
    int t2  [7];
    int b   [8];
    bit fv, lv, ovf, too_few;
    int min4, th;
    int n_cand_runs;   // number of runs of coefficients above Th
  } bd_ref_t;

  typedef struct {
    int qrs_on, qrs_off, q, s, p_on, p_peak, p_off, t_on, t_peak, t_off;
  } fe_ref_t;

  function automatic real gauss(real x, real mu, real sigma);
    return $exp(-0.5 * ((x - mu) / sigma) * ((x - mu) / sigma));
  endfunction

  // value at sample n of an ECG whose R-peaks sit at first_r + k*period
  function automatic int synth_ecg(int n, int period, int first_r, real amp, bit neg);
    real v = 0.0;
    for (int k = -2; k <= NF / period + 2; k++) begin
      real r = real'(first_r + k * period);
      v += 0.12 * gauss(real'(n), r - 170.0, 18.0);
      v -= 0.12 * gauss(real'(n), r - 22.0, 5.0);
      v += 1.00 * gauss(real'(n), r, 6.0);
      v -= 0.25 * gauss(real'(n), r + 20.0, 6.0);
      v += 0.30 * gauss(real'(n), r + 260.0, 40.0);
    end
    v = v * amp;
    if (neg) v = -v;
    return int'($rtoi(v + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic void haar_ref(input ecg_arr_t x, output cd3_arr_t d3, output cd5_arr_t d5);
    int a [NF];
    int len = NF;
    for (int i = 0; i < NF; i++) a[i] = x[i];
    for (int lvl = 1; lvl <= 5; lvl++) begin
      int na [NF];
      for (int i = 0; i < len / 2; i++) begin
        na[i] = a[2*i] + a[2*i+1];
        if (lvl == 3) d3[i] = a[2*i] - a[2*i+1];
        if (lvl == 5) d5[i] = a[2*i] - a[2*i+1];
      end
      len = len / 2;
      for (int i = 0; i < len; i++) a[i] = na[i];
    end
  endfunction

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic void bd_ref(input ecg_arr_t x, input cd3_arr_t d3, output bd_ref_t o);
    bit comp [NF3];
    int cand [$];
    int kept [$];
    o = '{default: 0};
    // sub-frame maxima
    o.min4 = 0;
    for (int sf = 0; sf < 4; sf++) begin
      int mx = d3[sf*128];
      for (int i = sf*128; i < sf*128 + 128; i++) if (d3[i] > mx) mx = d3[i];
      if (sf == 0 || mx < o.min4) o.min4 = mx;
    end
    o.th = (o.min4 * 154) >>> 8;
    for (int i = 0; i < NF3; i++) comp[i] = d3[i] > o.th;
    // last 1 of every run
    for (int i = 0; i < NF3; i++)
      if (comp[i] && (i == NF3 - 1 || !comp[i+1])) cand.push_back(i);
    o.n_cand_runs = cand.size();
    // clusters of candidates closer than 51 keep their last member
    for (int j = 0; j < cand.size(); j++)
      if (j == cand.size() - 1 || cand[j+1] - cand[j] > 50) kept.push_back(cand[j]);
    o.n = 0;
    foreach (kept[j]) begin
      if (o.n < 7) begin
        int t = kept[j];
        int lo = (t - 10 < 0) ? 0 : t - 10;
        int hi = (t + 10 > NF3 - 1) ? NF3 - 1 : t + 10;
        int mn = lo;
        int a, b, ri;
        for (int i = lo; i <= hi; i++) if (d3[i] < d3[mn]) mn = i;
        a = (mn < t) ? mn : t;
        b = (mn < t) ? t : mn;
        ri = a * 8;
        for (int i = a * 8; i <= b * 8; i++) if (absi(x[i]) > absi(x[ri])) ri = i;
        o.t1[o.n] = a;
        o.t2[o.n] = b;
        o.r[o.n]  = ri;
        o.rv[o.n] = x[ri];
        o.n++;
      end else begin
        o.ovf = 1;
      end
    end
    if (o.n < 2) begin
      o.too_few = 1;
      return;
    end
    for (int j = 1; j < o.n; j++) o.b[j] = (o.r[j-1] + o.r[j]) / 2;
    begin
      int h0 = (o.r[1] - o.r[0]) / 2;
      int hl = (o.r[o.n-1] - o.r[o.n-2]) / 2;
      if (o.r[0] - h0 >= 0) begin o.b[0] = o.r[0] - h0; o.fv = 1; end
      else begin o.b[0] = 0; o.fv = 0; end
      if (o.r[o.n-1] + hl <= NF - 1) begin o.b[o.n] = o.r[o.n-1] + hl; o.lv = 1; end
      else begin o.b[o.n] = NF - 1; o.lv = 0; end
    end
  endfunction

  // arg-extremum helpers, first index wins on ties
  function automatic int argmax_i(input int v [], int lo, int hi);
    int m = lo;
    for (int i = lo; i <= hi; i++) if (v[i] > v[m]) m = i;
    return m;
  endfunction
  function automatic int argmin_i(input int v [], int lo, int hi);
    int m = lo;
    for (int i = lo; i <= hi; i++) if (v[i] < v[m]) m = i;
    return m;
  endfunction
  function automatic int argabs_i(input int v [], int lo, int hi);
    int m = lo;
    for (int i = lo; i <= hi; i++) if (absi(v[i]) > absi(v[m])) m = i;
    return m;
  endfunction

  function automatic void fe_ref(input ecg_arr_t x, input cd5_arr_t d5, input bd_ref_t b,
                                 input int k, input int ext, output fe_ref_t f);
    int xe [] = new[NF];
    int c5 [] = new[NF5];
    int on3, off3, r, plo, phi, tlo, thi, x1, x2;
    for (int i = 0; i < NF; i++) xe[i] = x[i];
    for (int i = 0; i < NF5; i++) c5[i] = d5[i];
    on3  = (b.t1[k] - ext < 0) ? 0 : b.t1[k] - ext;
    off3 = (b.t2[k] + ext > NF3 - 1) ? NF3 - 1 : b.t2[k] + ext;
    r = b.r[k];
    f.qrs_on  = on3 * 8;
    f.qrs_off = off3 * 8;
    if (x[r] >= 0) begin
      f.q = argmin_i(xe, on3 * 8, r);
      f.s = argmin_i(xe, r, off3 * 8);
    end else begin
      f.q = argmax_i(xe, on3 * 8, r);
      f.s = argmax_i(xe, r, off3 * 8);
    end
    phi = on3 / 4;
    plo = b.b[k] / 32;
    if (plo > phi) plo = phi;
    x1 = argmax_i(c5, plo, phi);
    x2 = argmin_i(c5, plo, phi);
    f.p_on  = (x1 < x2 ? x1 : x2) * 32;
    f.p_off = (x1 < x2 ? x2 : x1) * 32;
    f.p_peak = argabs_i(xe, f.p_on, f.p_off);
    tlo = off3 / 4;
    thi = b.b[k+1] / 32;
    if (thi < tlo) thi = tlo;
    x1 = argmax_i(c5, tlo, thi);
    x2 = argmin_i(c5, tlo, thi);
    f.t_on  = (x1 < x2 ? x1 : x2) * 32;
    f.t_off = (x1 < x2 ? x2 : x1) * 32;
    f.t_peak = argabs_i(xe, f.t_on, f.t_off);
  endfunction

  // pack a reference boundary result into the RTL record
  function automatic ecg_pkg::bd_result_t to_bd_result(input bd_ref_t b);
    ecg_pkg::bd_result_t o = '0;
    o.n_peaks     = 3'(b.n);
    o.first_valid = b.fv;
    o.last_valid  = b.lv;
    o.overflow    = b.ovf;
    o.too_few     = b.too_few;
    for (int j = 0; j < 7; j++) begin
      o.r_idx[j] = 12'(b.r[j]);
      o.r_val[j] = 12'(b.rv[j]);
      o.t1[j]    = 9'(b.t1[j]);
      o.t2[j]    = 9'(b.t2[j]);
    end
    for (int j = 0; j < 8; j++) o.bound[j] = 12'(b.b[j]);
    return o;
  endfunction

endpackage
