// h264_ref_pkg: reference arithmetic of H.264 intra 4x4 coding used by the
// testbenches to work out expected values independently of the RTL. Blocks are
// plain int arrays indexed [y][x] (pixels) or [i][j] (coefficients); the
// transforms are written as matrix products, the predictions as the standard's
// per-mode equations on a neighbour function p(x,y).
package h264_ref_pkg;

  typedef int blk4_t [4][4];

  // neighbours: top[0..7] (p[x,-1]), left[0..3] (p[-1,y]), corner p[-1,-1]
  typedef struct {
    int top  [8];
    int left [4];
    int corner;
  } nbr_t;

  function automatic int p(input nbr_t n, input int x, input int y);
    if (x == -1 && y == -1) return n.corner;
    if (y == -1) return n.top[x];
    return n.left[y];
  endfunction

  function automatic int f3(input int a, input int b, input int c);
    return (a + 2*b + c + 2) >> 2;
  endfunction
  function automatic int f2(input int a, input int b);
    return (a + b + 1) >> 1;
  endfunction

  // One predicted pixel of luma mode m; dc is the DC value for mode 2.
  function automatic int pred_px(input nbr_t n, input int m, input int x, input int y, input int dc);
    int z;
    case (m)
      0: return p(n, x, -1);
      1: return p(n, -1, y);
      2: return dc;
      3: return (x == 3 && y == 3) ? (p(n,6,-1) + 3*p(n,7,-1) + 2) >> 2
                                   : f3(p(n,x+y,-1), p(n,x+y+1,-1), p(n,x+y+2,-1));
      4: begin
        if (x > y) return f3(p(n,x-y-2,-1), p(n,x-y-1,-1), p(n,x-y,-1));
        if (x < y) return f3(p(n,-1,y-x-2), p(n,-1,y-x-1), p(n,-1,y-x));
        return f3(p(n,0,-1), p(n,-1,-1), p(n,-1,0));
      end
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return f2(p(n,x-(y>>1)-1,-1), p(n,x-(y>>1),-1));
        if (z >= 0) return f3(p(n,x-(y>>1)-2,-1), p(n,x-(y>>1)-1,-1), p(n,x-(y>>1),-1));
        if (z == -1) return f3(p(n,-1,0), p(n,-1,-1), p(n,0,-1));
        return f3(p(n,-1,y-1), p(n,-1,y-2), p(n,-1,y-3));
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return f2(p(n,-1,y-(x>>1)-1), p(n,-1,y-(x>>1)));
        if (z >= 0) return f3(p(n,-1,y-(x>>1)-2), p(n,-1,y-(x>>1)-1), p(n,-1,y-(x>>1)));
        if (z == -1) return f3(p(n,-1,0), p(n,-1,-1), p(n,0,-1));
        return f3(p(n,x-1,-1), p(n,x-2,-1), p(n,x-3,-1));
      end
      7: begin
        if (y == 0 || y == 2) return f2(p(n,x+(y>>1),-1), p(n,x+(y>>1)+1,-1));
        return f3(p(n,x+(y>>1),-1), p(n,x+(y>>1)+1,-1), p(n,x+(y>>1)+2,-1));
      end
      default: begin
        z = x + 2*y;
        if (z > 5) return p(n,-1,3);
        if (z == 5) return (p(n,-1,2) + 3*p(n,-1,3) + 2) >> 2;
        if (z % 2 == 0) return f2(p(n,-1,y+(x>>1)), p(n,-1,y+(x>>1)+1));
        return f3(p(n,-1,y+(x>>1)), p(n,-1,y+(x>>1)+1), p(n,-1,y+(x>>1)+2));
      end
    endcase
  endfunction

  function automatic int dc_value(input nbr_t n, input bit use_t, input bit use_l);
    int st, sl;
    st = 0; sl = 0;
    for (int i = 0; i < 4; i++) begin st += n.top[i]; sl += n.left[i]; end
    if (use_t && use_l) return (st + sl + 4) >> 3;
    if (use_t) return (st + 2) >> 2;
    if (use_l) return (sl + 2) >> 2;
    return 128;
  endfunction

  // ---------- transforms ----------
  function automatic blk4_t fwd(input blk4_t x);
    int cf [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
    blk4_t t, w;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += cf[i][k] * x[k][j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      w[i][j] = 0;
      for (int k = 0; k < 4; k++) w[i][j] += t[i][k] * cf[j][k];
    end
    return w;
  endfunction

  function automatic int cls(input int i, input int j);
    if (i % 2 == 0 && j % 2 == 0) return 0;
    if (i % 2 == 1 && j % 2 == 1) return 1;
    return 2;
  endfunction

  function automatic int mf(input int q, input int c);
    int t [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                     '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
    return t[q % 6][c];
  endfunction
  function automatic int vv(input int q, input int c);
    int t [6][3] = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};
    return t[q % 6][c];
  endfunction

  function automatic int quant1(input int w, input int qp, input int c);
    int qb, a, z;
    qb = 15 + qp / 6;
    a = (w < 0) ? -w : w;
    z = int'((longint'(a) * mf(qp, c) + (longint'(1) << qb) / 3) >> qb);
    return (w < 0) ? -z : z;
  endfunction

  function automatic blk4_t quant(input blk4_t w, input int qp);
    blk4_t z;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) z[i][j] = quant1(w[i][j], qp, cls(i,j));
    return z;
  endfunction

  function automatic blk4_t dequant(input blk4_t z, input int qp);
    blk4_t d;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      d[i][j] = (z[i][j] * vv(qp, cls(i,j))) * (1 << (qp / 6));
    return d;
  endfunction

  // standard inverse transform, 8.5.12.2
  function automatic blk4_t inv(input blk4_t d);
    blk4_t f, h, r;
    for (int i = 0; i < 4; i++) begin
      int e0, e1, e2, e3;
      e0 = d[i][0] + d[i][2];
      e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3];
      e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      int g0, g1, g2, g3;
      g0 = f[0][j] + f[2][j];
      g1 = f[0][j] - f[2][j];
      g2 = (f[1][j] >>> 1) - f[3][j];
      g3 = f[1][j] + (f[3][j] >>> 1);
      h[0][j] = g0 + g3; h[1][j] = g1 + g2; h[2][j] = g1 - g2; h[3][j] = g0 - g3;
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) r[i][j] = (h[i][j] + 32) >>> 6;
    return r;
  endfunction

  // chroma DC: 2x2 Hadamard, quantisation and reconstruction (c[0..3] raster)
  function automatic void had2(input int a [4], output int b [4]);
    b[0] = a[0] + a[1] + a[2] + a[3];
    b[1] = a[0] - a[1] + a[2] - a[3];
    b[2] = a[0] + a[1] - a[2] - a[3];
    b[3] = a[0] - a[1] - a[2] + a[3];
  endfunction

  function automatic void chroma_dc(input int w [4], input int qp, output int lvl [4],
                                    output int dcc [4]);
    int f [4], g [4];
    int qb, a;
    had2(w, f);
    qb = 16 + qp / 6;
    for (int i = 0; i < 4; i++) begin
      a = (f[i] < 0) ? -f[i] : f[i];
      a = int'((longint'(a) * mf(qp, 0) + (longint'(1) << qb) / 3) >> qb);
      lvl[i] = (f[i] < 0) ? -a : a;
    end
    had2(lvl, g);
    for (int i = 0; i < 4; i++) dcc[i] = ((g[i] * 16 * vv(qp, 0)) <<< (qp / 6)) >>> 5;
  endfunction

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

endpackage
