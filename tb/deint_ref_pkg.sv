// deint_ref_pkg: integer reference model of the deinterlacing arithmetic, used
// by the testbenches to compute expected values independently of the RTL.
//
// Every quantity is computed with plain 32/64-bit integers straight from the
// formulas, with the fixed-point conventions documented in the RTL:
//   D_theta  = |a| + 2|b| + |c|                     (4 * d_theta)
//   w_theta  = floor(256 * (Dmax - D + 4) / (D - Dmin + 4))
//   y_sp     = floor(16 * sum(w * (pa + pb)/2) / sum(w))
//   w_t      = floor(256 * (Tmax - T + 6) / (T - Tmin + 6)), T = sum of six |x7 - xi|
//   y_tp     = floor(16 * (wp*x7p + wf*x7f) / (wp + wf))
//   w_temp   = max(256 - floor(256 * S / (2*Dmin + 4)), 0),
//              S = 4|x7f-x7p| + 2*min(|x4-x1p|+|x4-x1f|, |x10-x13p|+|x10-x13f|)
//   y        = round((y_sp*256 + w_temp*(y_tp - y_sp)) / 4096), limited to 255
package deint_ref_pkg;
  import deint_pkg::*;

  typedef struct {
    int x[1:13];        // current field x2..x6, x8..x12 (x1, x7, x13 unused)
    int p1, p7, p13;    // previous field
    int f1, f7, f13;    // next field
  } nbhd_t;

  typedef struct {
    int dmin4;
    int dir;            // index of the smallest difference: 0=45, 1=90, 2=135
    longint ys;
    int wp, wf;
    longint yt;
    int wt;
    int y;
  } ref_t;

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic ref_t compute(nbhd_t n, int dmin4_override = -1);
    ref_t   r;
    int     d[3], m[3], w[3];
    int     dmax, dmin, tp, tf, tmax, tmin, s, q, da, db;
    longint num, den, mix;
    d[0] = iabs(n.x[4] - n.x[8])  + 2 * iabs(n.x[5] - n.x[9])  + iabs(n.x[6] - n.x[10]);
    d[1] = iabs(n.x[3] - n.x[9])  + 2 * iabs(n.x[4] - n.x[10]) + iabs(n.x[5] - n.x[11]);
    d[2] = iabs(n.x[2] - n.x[10]) + 2 * iabs(n.x[3] - n.x[11]) + iabs(n.x[4] - n.x[12]);
    m[0] = n.x[5] + n.x[9];
    m[1] = n.x[4] + n.x[10];
    m[2] = n.x[3] + n.x[11];
    dmax = d[0]; dmin = d[0]; r.dir = 0;
    for (int k = 1; k < 3; k++) begin
      if (d[k] > dmax) dmax = d[k];
      if (d[k] < dmin) begin dmin = d[k]; r.dir = k; end
    end
    r.dmin4 = dmin;
    num = 0; den = 0;
    for (int k = 0; k < 3; k++) begin
      w[k] = (256 * (dmax - d[k] + 4)) / (d[k] - dmin + 4);
      num += longint'(w[k]) * m[k];
      den += w[k];
    end
    r.ys = (num * 8) / den;

    tp = 0; tf = 0;
    foreach (n.x[i]) begin
      if (i inside {3, 4, 5, 9, 10, 11}) begin
        tp += iabs(n.p7 - n.x[i]);
        tf += iabs(n.f7 - n.x[i]);
      end
    end
    tmax = (tp > tf) ? tp : tf;
    tmin = (tp > tf) ? tf : tp;
    r.wp = (256 * (tmax - tp + 6)) / (tp - tmin + 6);
    r.wf = (256 * (tmax - tf + 6)) / (tf - tmin + 6);
    r.yt = (16 * (longint'(r.wp) * n.p7 + longint'(r.wf) * n.f7)) / (r.wp + r.wf);

    if (dmin4_override >= 0) dmin = dmin4_override;
    da = iabs(n.x[4] - n.p1) + iabs(n.x[4] - n.f1);      // line above x7
    db = iabs(n.x[10] - n.p13) + iabs(n.x[10] - n.f13);  // line below x7
    s = 4 * iabs(n.f7 - n.p7) + 2 * ((da < db) ? da : db);
    q = (256 * s) / (2 * dmin + 4);
    r.wt = (q >= 256) ? 0 : 256 - q;

    r.y = blend(r.ys, r.yt, r.wt);
    return r;
  endfunction

  function automatic int blend(longint ys, longint yt, int wt);
    longint mix;
    int y;
    mix = ys * 256 + longint'(wt) * (yt - ys);
    y = int'((mix + 2048) >>> 12);
    return (y > 255) ? 255 : y;
  endfunction

  // Neighbourhood of a window as the reference model's integers.
  function automatic nbhd_t to_nbhd(win_t w);
    nbhd_t n;
    n.x[1] = 0; n.x[7] = 0; n.x[13] = 0;
    for (int k = 0; k < 5; k++) begin
      n.x[2 + k] = int'(w.top[k]);
      n.x[8 + k] = int'(w.bot[k]);
    end
    n.p1 = int'(w.x1p); n.p7 = int'(w.x7p); n.p13 = int'(w.x13p);
    n.f1 = int'(w.x1f); n.f7 = int'(w.x7f); n.f13 = int'(w.x13f);
    return n;
  endfunction

  // Random window: 0 uniform noise, 1 flat area with small noise,
  // 2 random-slope edge, 3 static scene with a thin line on x7's line.
  function automatic win_t rand_win();
    win_t w;
    int   mode, base, s, lo, hi;
    mode = $urandom_range(0, 3);
    base = $urandom_range(0, 255);
    lo = $urandom_range(0, 255);
    hi = $urandom_range(0, 255);
    s  = $urandom_range(0, 4) - 2;     // edge offset per line
    for (int k = 0; k < 5; k++) begin
      case (mode)
        0: begin w.top[k] = pix_t'($urandom); w.bot[k] = pix_t'($urandom); end
        1: begin
          w.top[k] = pix_t'((base + $urandom_range(0, 6)) % 256);
          w.bot[k] = pix_t'((base + $urandom_range(0, 6)) % 256);
        end
        default: begin
          w.top[k] = pix_t'((k + s < 2) ? lo : hi);
          w.bot[k] = pix_t'((k - s < 2) ? lo : hi);
        end
      endcase
    end
    case (mode)
      0: begin
        w.x1p = pix_t'($urandom); w.x7p = pix_t'($urandom); w.x13p = pix_t'($urandom);
        w.x1f = pix_t'($urandom); w.x7f = pix_t'($urandom); w.x13f = pix_t'($urandom);
      end
      3: begin
        w.x1p = w.top[2]; w.x13p = w.bot[2]; w.x1f = w.top[2]; w.x13f = w.bot[2];
        w.x7p = pix_t'(base); w.x7f = pix_t'(base);
      end
      default: begin
        w.x1p = w.top[2]; w.x13p = w.bot[2];
        w.x1f = pix_t'($urandom); w.x13f = pix_t'($urandom);
        w.x7p = pix_t'((base + $urandom_range(0, 3)) % 256);
        w.x7f = pix_t'($urandom);
      end
    endcase
    return w;
  endfunction

endpackage
