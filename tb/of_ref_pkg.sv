// of_ref_pkg: behavioural reference of the hierarchical Horn-Schunck flow,
// written independently of the RTL from the algorithm's equations, for the
// testbenches.  Frames are flat dynamic arrays indexed y*w + x, values Q16.16.
// The rounding rules follow the RTL number format: products truncated
// towards minus infinity, quotients towards zero, borders replicated.
package of_ref_pkg;
  import of_pkg::*;

  typedef fx_t frame_t[];

  function automatic int clampr(int v, int lo, int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic fx_t at(const ref frame_t f, input int w, input int h, input int x, input int y);
    return f[clampr(y, 0, h-1) * w + clampr(x, 0, w-1)];
  endfunction

  function automatic fx_t mulr(fx_t a, fx_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return fx_t'(p >>> 16);
  endfunction

  // 5x5 binomial Gaussian then keep even rows/columns.
  function automatic frame_t down(const ref frame_t f, input int w, input int h);
    frame_t o;
    int k[5] = '{1, 4, 6, 4, 1};
    o = new[(w/2) * (h/2)];
    for (int y = 0; y < h/2; y++)
      for (int x = 0; x < w/2; x++) begin
        longint s = 0;
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++)
            s += longint'(k[dy+2] * k[dx+2]) * longint'(at(f, w, h, 2*x + dx, 2*y + dy));
        o[y*(w/2) + x] = fx_t'(s >>> 8);
      end
    return o;
  endfunction

  // Fine field (2wc x 2hc) = 2 * nearest coarse vector.
  function automatic frame_t up(const ref frame_t c, input int wc, input int hc);
    frame_t o;
    o = new[4 * wc * hc];
    for (int y = 0; y < 2*hc; y++)
      for (int x = 0; x < 2*wc; x++)
        o[y*2*wc + x] = 2 * c[(y/2)*wc + x/2];
    return o;
  endfunction

  function automatic fx_t keys(fx_t f, int tap);
    fx_t f2 = mulr(f, f);
    fx_t f3 = mulr(f2, f);
    case (tap)
      0: return (-f3 + 2*f2 - f) >>> 1;
      1: return (3*f3 - 5*f2 + 32'sd131072) >>> 1;
      2: return (-3*f3 + 4*f2 + f) >>> 1;
      default: return (f3 - f2) >>> 1;
    endcase
  endfunction

  // I2 sampled at (x+u, y+v); displacement limited to the window of half
  // size d; interp 0 bilinear, 1 bicubic.
  function automatic frame_t warp(const ref frame_t i2, const ref frame_t u, const ref frame_t v,
                                  input int w, input int h, input int d, input int interp);
    frame_t o;
    o = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        longint lo, hi, uu, vv;
        int iu, iv;
        fx_t fu, fv, res;
        lo = (interp == 0) ? -longint'(d) * 65536 : -longint'(d-1) * 65536;
        hi = (interp == 0) ?  longint'(d) * 65536 - 1 : longint'(d-1) * 65536 - 1;
        uu = u[y*w+x]; vv = v[y*w+x];
        if (uu < lo) uu = lo; if (uu > hi) uu = hi;
        if (vv < lo) vv = lo; if (vv > hi) vv = hi;
        iu = int'(uu >>> 16); iv = int'(vv >>> 16);
        fu = fx_t'(uu - longint'(iu) * 65536);
        fv = fx_t'(vv - longint'(iv) * 65536);
        if (interp == 0) begin
          fx_t a, b, c, e, t, bt;
          a = at(i2, w, h, x+iu,   y+iv);   b = at(i2, w, h, x+iu+1, y+iv);
          c = at(i2, w, h, x+iu,   y+iv+1); e = at(i2, w, h, x+iu+1, y+iv+1);
          t  = a + mulr(fu, b - a);
          bt = c + mulr(fu, e - c);
          res = t + mulr(fv, bt - t);
        end else begin
          res = 0;
          for (int j = 0; j < 4; j++) begin
            fx_t rs = 0;
            for (int k = 0; k < 4; k++)
              rs += mulr(keys(fu, k), at(i2, w, h, x+iu+k-1, y+iv+j-1));
            res += mulr(keys(fv, j), rs);
          end
        end
        o[y*w+x] = res;
      end
    return o;
  endfunction

  // One Horn-Schunck iteration of the residual (du, dv), in place.
  function automatic void hs_iter(const ref frame_t i1, const ref frame_t i2r,
                                  ref frame_t du, ref frame_t dv, input int w, input int h, input fx_t alpha2);
    frame_t nu, nv;
    nu = new[w*h]; nv = new[w*h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        fx_t a00, a01, a10, a11, b00, b01, b10, b11, ix, iy, it, ub, vb, num, den, r;
        longint su, sv, q;
        a00 = at(i1, w, h, x, y);    a01 = at(i1, w, h, x+1, y);
        a10 = at(i1, w, h, x, y+1);  a11 = at(i1, w, h, x+1, y+1);
        b00 = at(i2r, w, h, x, y);   b01 = at(i2r, w, h, x+1, y);
        b10 = at(i2r, w, h, x, y+1); b11 = at(i2r, w, h, x+1, y+1);
        ix = (a01 - a00 + a11 - a10 + b01 - b00 + b11 - b10) >>> 2;
        iy = (a10 - a00 + a11 - a01 + b10 - b00 + b11 - b01) >>> 2;
        it = (b00 - a00 + b01 - a01 + b10 - a10 + b11 - a11) >>> 2;
        su = 0; sv = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int wt;
            wt = (dx == 0 && dy == 0) ? 0 : (dx == 0 || dy == 0) ? 2 : 1;
            su += wt * longint'(at(du, w, h, x+dx, y+dy));
            sv += wt * longint'(at(dv, w, h, x+dx, y+dy));
          end
        ub = fx_t'((su * 5461) >>> 16);
        vb = fx_t'((sv * 5461) >>> 16);
        num = mulr(ix, ub) + mulr(iy, vb) + it;
        den = alpha2 + mulr(ix, ix) + mulr(iy, iy);
        q = (den > 0) ? (longint'(num) * 65536) / longint'(den) : 0;
        r = fx_t'(q);
        nu[y*w+x] = ub - mulr(ix, r);
        nv[y*w+x] = vb - mulr(iy, r);
      end
    du = nu; dv = nv;
  endfunction

endpackage
