// sift_ref_pkg: independent reference model of the SIFT engine, used by the
// testbenches.  It works on whole images held in arrays and computes every
// quantity by direct summation (no integral image, no streaming), so its
// results can be compared with the hardware sample by sample.
//
// Images: src is the raw input, base[o] the base image of octave o.  All
// out-of-image pixels read as zero, as in the hardware.
package sift_ref_pkg;

  localparam int MAXH = 1080;
  localparam int MAXW = 1920;

  int src  [MAXH][MAXW];
  int base [2][MAXH][MAXW];
  int bw [2];
  int bh [2];

  function automatic int src_at(int r, int c);
    if (r < 0 || c < 0 || r >= MAXH || c >= MAXW) return 0;
    return src[r][c];
  endfunction

  function automatic int base_at(int o, int r, int c);
    if (r < 0 || c < 0 || r >= bh[o] || c >= bw[o]) return 0;
    return base[o][r][c];
  endfunction

  // 3x3 binomial smoothing tagged at the window's bottom-right pixel
  function automatic int smooth(int r, int c);
    int w [3] = '{1, 2, 1};
    int s = 0;
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 3; x++)
        s += w[y] * w[x] * src_at(r - 2 + y, c - 2 + x);
    return (s + 8) >>> 4;
  endfunction

  function automatic int box(int o, int r, int c, int h);
    int s = 0;
    for (int y = r - h; y <= r + h; y++)
      for (int x = c - h; x <= c + h; x++)
        s += base_at(o, y, x);
    return s;
  endfunction

  function automatic int norm(longint s, longint recip);
    longint p;
    p = (s * recip + 32768) >>> 16;
    return (p > 255) ? 255 : int'(p);
  endfunction

  // the four scales: 3x3, 5x5+3x3, 7x7+5x5, 7x7
  function automatic int gscale(int o, int k, int r, int c);
    case (k)
      0: return norm(box(o, r, c, 1), 7282);
      1: return norm(box(o, r, c, 2) + box(o, r, c, 1), 1928);
      2: return norm(box(o, r, c, 3) + box(o, r, c, 2), 886);
      default: return norm(box(o, r, c, 3), 1337);
    endcase
  endfunction

  function automatic int dog(int o, int k, int r, int c);
    return gscale(o, k + 1, r, c) - gscale(o, k, r, c);
  endfunction

  // reject vector of the cube centred on (r, c) of DoG layer 1
  function automatic logic [27:0] svec_of(int d [3][3][3], int edge_r, int bright_pct);
    logic [27:0] s;
    int n, ctr, dxx, dyy, dxy4, tr, mag;
    longint det16;
    s = '0;
    ctr = d[1][1][1];
    n = 0;
    for (int l = 0; l < 3; l++)
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++)
          if (!(l == 1 && y == 1 && x == 1)) begin
            if (ctr >= 0) s[25 - n] = !(ctr > d[l][y][x]);
            else          s[25 - n] = !(ctr < d[l][y][x]);
            n++;
          end
    dxx  = d[1][1][2] + d[1][1][0] - 2 * ctr;
    dyy  = d[1][2][1] + d[1][0][1] - 2 * ctr;
    dxy4 = d[1][2][2] - d[1][2][0] - d[1][0][2] + d[1][0][0];
    tr   = dxx + dyy;
    det16 = 16 * longint'(dxx) * dyy - longint'(dxy4) * dxy4;
    s[26] = (det16 <= 0) || (16 * longint'(tr) * tr * edge_r >= longint'((edge_r + 1) * (edge_r + 1)) * det16);
    mag = (ctr < 0) ? -ctr : ctr;
    s[27] = (mag * 100 < 255 * bright_pct);
    return s;
  endfunction

  function automatic logic [27:0] svec(int o, int r, int c);
    int d [3][3][3];
    for (int l = 0; l < 3; l++)
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++)
          d[l][y][x] = dog(o, l, r - 1 + y, c - 1 + x);
    return svec_of(d, 10, 4);
  endfunction

  function automatic int isqrt(longint a);
    int y = 0;
    while (longint'(y + 1) * (y + 1) <= a) y++;
    return y;
  endfunction

  // dominant orientation of the 15x15 scale-1 patch around (r, c)
  function automatic void orientation(int o, int r, int c, output int bin_o, output int peak_o);
    int lp [15][15];
    longint hist [36];
    int tanq [4] = '{45, 93, 148, 215};
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++)
        lp[i][j] = gscale(o, 1, r - 7 + i, c - 7 + j);
    foreach (hist[k]) hist[k] = 0;
    for (int i = 1; i <= 13; i++)
      for (int j = 1; j <= 13; j++) begin
        int dx, dy, ax, ay, mn, mx, mag, q, k, b, bin;
        dx = lp[i][j+1] - lp[i][j-1];
        dy = lp[i+1][j] - lp[i-1][j];
        ax = dx < 0 ? -dx : dx;
        ay = dy < 0 ? -dy : dy;
        mn = ax < ay ? ax : ay;
        mx = ax < ay ? ay : ax;
        if (mx == 0) continue;
        mag = isqrt(longint'(dx) * dx + longint'(dy) * dy);
        q = (mn * 256) / mx;
        k = 0;
        for (int t = 0; t < 4; t++) if (q >= tanq[t]) k++;
        b = (ax < ay) ? 8 - k : k;
        if (dx >= 0 && dy >= 0)     bin = b;
        else if (dx < 0 && dy >= 0) bin = 17 - b;
        else if (dx < 0 && dy < 0)  bin = 18 + b;
        else                        bin = 35 - b;
        hist[bin] += mag;
      end
    bin_o = 0;
    peak_o = 0;
    for (int k = 0; k < 36; k++)
      if (hist[k] > peak_o) begin peak_o = int'(hist[k]); bin_o = k; end
  endfunction

  // ---- cached whole-octave arrays, for frame-size runs -------------------
  int garr [2][4][MAXH][MAXW];

  // fill garr[o] for every position of octave o, using a 2-D prefix sum
  int ps [MAXH+1][MAXW+1];   // prefix-sum scratch, static to keep it off the stack
  function automatic void precompute(int o);
    for (int r = 0; r <= bh[o]; r++) ps[r][0] = 0;
    for (int c = 0; c <= bw[o]; c++) ps[0][c] = 0;
    for (int r = 0; r < bh[o]; r++)
      for (int c = 0; c < bw[o]; c++)
        ps[r+1][c+1] = base[o][r][c] + ps[r][c+1] + ps[r+1][c] - ps[r][c];
    for (int r = 0; r < bh[o]; r++)
      for (int c = 0; c < bw[o]; c++) begin
        int b [4];
        for (int h = 1; h <= 3; h++) begin
          int r0, r1, c0, c1;
          r0 = (r - h < 0) ? 0 : r - h;
          c0 = (c - h < 0) ? 0 : c - h;
          r1 = (r + h > bh[o] - 1) ? bh[o] - 1 : r + h;
          c1 = (c + h > bw[o] - 1) ? bw[o] - 1 : c + h;
          b[h] = ps[r1+1][c1+1] - ps[r0][c1+1] - ps[r1+1][c0] + ps[r0][c0];
        end
        garr[o][0][r][c] = norm(b[1], 7282);
        garr[o][1][r][c] = norm(b[2] + b[1], 1928);
        garr[o][2][r][c] = norm(b[3] + b[2], 886);
        garr[o][3][r][c] = norm(b[3], 1337);
      end
  endfunction

  function automatic logic [27:0] svec_c(int o, int r, int c);
    int d [3][3][3];
    for (int l = 0; l < 3; l++)
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++)
          d[l][y][x] = garr[o][l+1][r-1+y][c-1+x] - garr[o][l][r-1+y][c-1+x];
    return svec_of(d, 10, 4);
  endfunction

endpackage
