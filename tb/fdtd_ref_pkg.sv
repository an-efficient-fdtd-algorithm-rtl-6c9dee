// fdtd_ref_pkg: bit-exact software model of the FDTD engine's arithmetic,
// used by the testbenches as the independent reference.
//
// Values are held as 64-bit signed integers equal to the W-bit fixed-point
// word sign-extended (so W up to 48 works). wrap() reduces to W bits with
// sign extension, fmul() multiplies two fixed-point words with a 128-bit
// product and drops FRAC fraction bits (truncation), as the hardware does.
// fdtd_ref holds a full grid (index x*N + y) and advances it one time step
// with the standard Yee TMz update and zero field outside the grid.
package fdtd_ref_pkg;

  function automatic longint wrap(longint v, int unsigned w);
    return (v <<< (64 - w)) >>> (64 - w);
  endfunction

  function automatic longint fmul(longint a, longint b, int unsigned w, int unsigned frac);
    logic signed [127:0] p;
    p = 128'(a) * 128'(b);
    p = p >>> frac;
    return wrap(longint'(p[63:0]), w);
  endfunction

  class fdtd_ref;
    int unsigned n, w, frac;
    longint ez[], hx[], hy[];
    longint ceze[], cezh[], chxh[], chxe[], chyh[], chye[];

    function new(int unsigned n_, int unsigned w_, int unsigned frac_);
      n = n_; w = w_; frac = frac_;
      ez = new[n*n]; hx = new[n*n]; hy = new[n*n];
      ceze = new[n*n]; cezh = new[n*n]; chxh = new[n*n];
      chxe = new[n*n]; chyh = new[n*n]; chye = new[n*n];
      foreach (ez[k]) begin ez[k] = 0; hx[k] = 0; hy[k] = 0; end
    endfunction

    function automatic bit inb(int x, int y);
      return !(x < 0 || y < 0 || x >= int'(n) || y >= int'(n));
    endfunction

    // one time step: Ez first (with additive source), then Hx and Hy
    function void step(longint src, int sx, int sy);
      longint ezn[], hxn[], hyn[];
      ezn = new[n*n]; hxn = new[n*n]; hyn = new[n*n];
      for (int x = 0; x < int'(n); x++)
        for (int y = 0; y < int'(n); y++) begin
          longint curl, e;
          int k;
          k = x*n + y;
          curl = wrap(wrap(hy[k] - (inb(x-1, y) ? hy[k-n] : 0), w) - wrap(hx[k] - (inb(x, y-1) ? hx[k-1] : 0), w), w);
          e = wrap(fmul(ceze[k], ez[k], w, frac) + fmul(cezh[k], curl, w, frac), w);
          if (x == sx && y == sy) e = wrap(e + src, w);
          ezn[k] = e;
        end
      for (int x = 0; x < int'(n); x++)
        for (int y = 0; y < int'(n); y++) begin
          int k;
          k = x*n + y;
          hxn[k] = wrap(fmul(chxh[k], hx[k], w, frac)
                      - fmul(chxe[k], wrap((inb(x, y+1) ? ezn[k+1] : 0) - ezn[k], w), w, frac), w);
          hyn[k] = wrap(fmul(chyh[k], hy[k], w, frac)
                      + fmul(chye[k], wrap((inb(x+1, y) ? ezn[k+n] : 0) - ezn[k], w), w, frac), w);
        end
      ez = ezn; hx = hxn; hy = hyn;
    endfunction
  endclass

  // double-precision model of the same update, for error measurements
  class fdtd_real;
    int unsigned n;
    real ez[], hx[], hy[];
    real ceze[], cezh[], chxh[], chxe[], chyh[], chye[];

    function new(int unsigned n_);
      n = n_;
      ez = new[n*n]; hx = new[n*n]; hy = new[n*n];
      ceze = new[n*n]; cezh = new[n*n]; chxh = new[n*n];
      chxe = new[n*n]; chyh = new[n*n]; chye = new[n*n];
      foreach (ez[k]) begin ez[k] = 0.0; hx[k] = 0.0; hy[k] = 0.0; end
    endfunction

    function void step(real src, int sx, int sy);
      real ezn[];
      ezn = new[n*n];
      for (int x = 0; x < int'(n); x++)
        for (int y = 0; y < int'(n); y++) begin
          int k;
          real hyw, hxs;
          k = x*n + y;
          hyw = (x > 0) ? hy[k-n] : 0.0;
          hxs = (y > 0) ? hx[k-1] : 0.0;
          ezn[k] = ceze[k] * ez[k] + cezh[k] * ((hy[k] - hyw) - (hx[k] - hxs));
          if (x == sx && y == sy) ezn[k] += src;
        end
      for (int x = 0; x < int'(n); x++)
        for (int y = 0; y < int'(n); y++) begin
          int k;
          real en, ee;
          k = x*n + y;
          en = (y < int'(n) - 1) ? ezn[k+1] : 0.0;
          ee = (x < int'(n) - 1) ? ezn[k+n] : 0.0;
          hx[k] = chxh[k] * hx[k] - chxe[k] * (en - ezn[k]);
          hy[k] = chyh[k] * hy[k] + chye[k] * (ee - ezn[k]);
        end
      ez = ezn;
    endfunction
  endclass

  // Photonic-crystal bend used by the full-size benches: cell size
  // 37.5 nm, 7 x 7 square silicon rods of 4 x 4 cells on a 12-cell pitch,
  // centred in an n x n grid; the middle row's rods from the left edge to
  // the centre and the middle column's rods below the centre are removed.
  function automatic bit pc_is_si(int n, int x, int y);
    int x0, ix, iy, ox, oy;
    x0 = (n - 7 * 12) / 2;
    if (x < x0 || y < x0 || x >= x0 + 84 || y >= x0 + 84) return 0;
    ix = (x - x0) / 12; ox = (x - x0) % 12;
    iy = (y - x0) / 12; oy = (y - x0) % 12;
    if (ox < 4 || ox >= 8 || oy < 4 || oy >= 8) return 0;
    if (iy == 3 && ix <= 3) return 0;
    if (ix == 3 && iy < 3) return 0;
    return 1;
  endfunction

  // loss of the absorbing border: quadratic over pml cells, 0.3 at the edge
  function automatic real pc_loss(int n, int pml, int x, int y);
    int d;
    d = 0;
    if (x < pml) d = pml - x;
    if (x >= n - pml && x - (n - pml - 1) > d) d = x - (n - pml - 1);
    if (y < pml && pml - y > d) d = pml - y;
    if (y >= n - pml && y - (n - pml - 1) > d) d = y - (n - pml - 1);
    return 0.3 * (real'(d) / real'(pml)) ** 2;
  endfunction

endpackage
