// tb_ref_pkg: reference models used by the testbenches. They are written
// directly from the definitions (H.264 interpolation formulas, matrix
// Hadamard transform, plain SAD, the four-step search as a list of
// candidates) rather than from the structure of the RTL.
package tb_ref_pkg;
  import enc_pkg::*;

  typedef pix_t sw_t [SW_H][SW_W];
  typedef pix_t mb_t [16][16];

  function automatic int clampi(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int clip255(input int v);
    return clampi(v, 0, 255);
  endfunction

  // signed Exp-Golomb length, by counting
  function automatic int eg_len(input int v);
    int code, len;
    code = v > 0 ? 2*v - 1 : -2*v;
    len = 1;
    while ((1 << ((len - 1) / 2 + 1)) - 1 <= code) len += 2;
    return len;
  endfunction

  // pixel of the window with edge clamping
  function automatic int px(const ref sw_t sw, input int x, input int y);
    return int'(sw[clampi(y, 0, SW_H-1)][clampi(x, 0, SW_W-1)]);
  endfunction

  // H.264 luma sample at half-pel position (2x+fx, 2y+fy) given in half units
  function automatic int half_sample(const ref sw_t sw, input int x2, input int y2);
    int x, y, fx, fy, acc, t;
    int c [6];
    x = x2 >>> 1; y = y2 >>> 1; fx = x2 & 1; fy = y2 & 1;
    c = '{1, -5, 20, 20, -5, 1};
    if (!fx && !fy) return px(sw, x, y);
    if (fx && !fy) begin
      acc = 0;
      for (int k = 0; k < 6; k++) acc += c[k] * px(sw, x - 2 + k, y);
      return clip255((acc + 16) >>> 5);
    end
    if (!fx && fy) begin
      acc = 0;
      for (int k = 0; k < 6; k++) acc += c[k] * px(sw, x, y - 2 + k);
      return clip255((acc + 16) >>> 5);
    end
    acc = 0;
    for (int k = 0; k < 6; k++) begin
      t = 0;
      for (int m = 0; m < 6; m++) t += c[m] * px(sw, x - 2 + m, y - 2 + k);
      acc += c[k] * t;
    end
    return clip255((acc + 512) >>> 10);
  endfunction

  // 4x4 Hadamard by matrix product H * X * H
  function automatic void hadamard(input int x [4][4], output int y [4][4]);
    int h [4][4];
    int t [4][4];
    h = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += h[i][k] * x[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        y[i][j] = 0;
        for (int k = 0; k < 4; k++) y[i][j] += t[i][k] * h[j][k];
      end
  endfunction

  // SAD of a w x h block at (bx,by) of the MB for integer MV (mx,my)
  function automatic int sad_blk(const ref sw_t sw, const ref mb_t cur, input int mx, input int my,
                                 input int bx, input int by, input int w, input int h);
    int s;
    s = 0;
    for (int r = by; r < by + h; r++)
      for (int c = bx; c < bx + w; c++) begin
        int d;
        d = int'(cur[r][c]) - int'(sw[r + my + 16][c + mx + 32]);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  // geometry of VBS block k: x, y, w, h in pixels
  function automatic void vbs_geom(input int k, output int x, output int y, output int w, output int h);
    if (k == 0) begin x = 0; y = 0; w = 16; h = 16; end
    else if (k <= 2) begin x = 0; y = (k - 1) * 8; w = 16; h = 8; end
    else if (k <= 4) begin x = (k - 3) * 8; y = 0; w = 8; h = 16; end
    else if (k <= 8) begin x = ((k - 5) % 2) * 8; y = ((k - 5) / 2) * 8; w = 8; h = 8; end
    else if (k <= 16) begin
      x = (((k - 9) / 2) % 2) * 8; y = (((k - 9) / 2) / 2) * 8 + ((k - 9) % 2) * 4; w = 8; h = 4;
    end else if (k <= 24) begin
      x = (((k - 17) / 2) % 2) * 8 + ((k - 17) % 2) * 4; y = (((k - 17) / 2) / 2) * 8; w = 4; h = 8;
    end else begin x = ((k - 25) % 4) * 4; y = ((k - 25) / 4) * 4; w = 4; h = 4; end
  endfunction

  function automatic int mv_rate(input int mx, input int my, input int px_, input int py_, input int lam);
    return lam * (eg_len(4 * (mx - px_)) + eg_len(4 * (my - py_)));
  endfunction

  function automatic bit in_sr(input int x, input int y);
    return x >= -32 && x <= 31 && y >= -16 && y <= 15;
  endfunction

  // Four-step search reference: returns the 41 best costs and MVs.
  function automatic void fss_ref(const ref sw_t sw, const ref mb_t cur, input int ix [4], input int iy [4],
                                  input int n_init, input int mvpx, input int mvpy, input int lam,
                                  output int bcost [41], output int bmx [41], output int bmy [41],
                                  output int ncand);
    int ox [9], oy [9];
    ox = '{0, -1, -1, 0, 1, 1, 1, 0, -1};
    oy = '{0, 0, -1, -1, -1, 0, 1, 1, 1};
    ncand = 0;
    for (int k = 0; k < 41; k++) begin bcost[k] = 32'h3FFFF; bmx[k] = 0; bmy[k] = 0; end
    for (int it = 0; it < n_init; it++) begin
      int cx, cy, lcost, lx, ly, step;
      bit fine;
      cx = clampi(ix[it], -32, 31); cy = clampi(iy[it], -16, 15);
      lcost = 32'h3FFFF; lx = 0; ly = 0; step = 1; fine = 0;
      forever begin
        for (int i = 0; i < 9; i++) begin
          int sx, sy, r;
          sx = cx + (fine ? 1 : 2) * ox[i];
          sy = cy + (fine ? 1 : 2) * oy[i];
          if (!in_sr(sx, sy)) continue;
          ncand++;
          r = mv_rate(sx, sy, mvpx, mvpy, lam);
          for (int k = 0; k < 41; k++) begin
            int x, y, w, h, c;
            vbs_geom(k, x, y, w, h);
            c = sad_blk(sw, cur, sx, sy, x, y, w, h) + r;
            if (c < bcost[k]) begin bcost[k] = c; bmx[k] = sx; bmy[k] = sy; end
            if (k == 0 && c < lcost) begin lcost = c; lx = sx; ly = sy; end
          end
        end
        if (fine) break;
        if ((lx != cx || ly != cy) && step != 3) begin
          step++; cx = lx; cy = ly;
        end else begin
          fine = 1; cx = lx; cy = ly;
        end
      end
    end
  endfunction

  // Offsets (quarter pel) of FME candidate i: 0..8 half, 9..24 quarter
  function automatic void cand_off(input int i, output int dx, output int dy);
    int q;
    if (i < 9) begin dx = 2 * (i % 3) - 2; dy = 2 * (i / 3) - 2; return; end
    q = 9;
    for (int y = -2; y <= 2; y++)
      for (int x = -2; x <= 2; x++)
        if ((x & 1) || (y & 1)) begin
          if (q == i) begin dx = x; dy = y; end
          q++;
        end
  endfunction

  // FME distortion of the 25 candidates for one partition (pixels bx..bx+w-1,
  // by..by+h-1) around integer centre (cx,cy): SATD of half candidates from
  // interpolated pixels; quarter candidates from the averaged transforms.
  function automatic void fme_ref(const ref sw_t sw, const ref mb_t cur, input int cx, input int cy,
                                  input int bx, input int by, input int w, input int h,
                                  output int d [25]);
    for (int i = 0; i < 25; i++) d[i] = 0;
    for (int yb = by; yb < by + h; yb += 4)
      for (int xb = bx; xb < bx + w; xb += 4) begin
        int th [9][4][4];
        for (int hc = 0; hc < 9; hc++) begin
          int res [4][4];
          int t [4][4];
          int hx, hy;
          hx = hc % 3 - 1; hy = hc / 3 - 1;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              res[r][c] = int'(cur[yb + r][xb + c]) -
                          half_sample(sw, 2 * (xb + c + cx + 32) + hx, 2 * (yb + r + cy + 16) + hy);
          hadamard(res, t);
          th[hc] = t;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) d[hc] += t[r][c] < 0 ? -t[r][c] : t[r][c];
        end
        for (int q = 9; q < 25; q++) begin
          int dx, dy, a, b;
          cand_off(q, dx, dy);
          // the two half candidates whose samples H.264 averages
          if ((dx & 1) && (dy & 1)) begin
            if ((dx > 0) == (dy > 0)) begin
              a = ((dy - 1) / 2 + 1) * 3 + (dx + 1) / 2 + 1; b = ((dy + 1) / 2 + 1) * 3 + (dx - 1) / 2 + 1;
            end else begin
              a = ((dy - 1) / 2 + 1) * 3 + (dx - 1) / 2 + 1; b = ((dy + 1) / 2 + 1) * 3 + (dx + 1) / 2 + 1;
            end
          end else if (dx & 1) begin
            a = (dy / 2 + 1) * 3 + (dx - 1) / 2 + 1; b = (dy / 2 + 1) * 3 + (dx + 1) / 2 + 1;
          end else begin
            a = ((dy - 1) / 2 + 1) * 3 + dx / 2 + 1; b = ((dy + 1) / 2 + 1) * 3 + dx / 2 + 1;
          end
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              int v;
              v = (th[a][r][c] + th[b][r][c]) >>> 1;
              d[q] += v < 0 ? -v : v;
            end
        end
      end
  endfunction
endpackage
