// h264_ref_pkg: reference models for the testbenches of the H.264 intra
// datapath. Written from the H.264 equations in their textbook form (p[x,y]
// neighbour notation, matrix products, typed-in factor tables), independently
// of the RTL's own formulation, so the testbenches can compare against them.
package h264_ref_pkg;

  typedef int blk16_t [16];

  // ------------------------------------------------------------ tables
  // rows: QP mod 6; columns: (even,even) (odd,odd) (other)
  localparam int MF_T [6][3] = '{ '{13107, 5243, 8066}, '{11916, 4660, 7490},
                                  '{10082, 4194, 6554}, '{ 9362, 3647, 5825},
                                  '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559} };
  localparam int V_T  [6][3] = '{ '{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                                  '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23} };

  function automatic int col_of(int row, int col);
    if ((row % 2 == 0) && (col % 2 == 0)) return 0;
    if ((row % 2 == 1) && (col % 2 == 1)) return 1;
    return 2;
  endfunction

  function automatic int clip255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // ------------------------------------------------------------ 4x4 intra
  // nb: p[x,-1] for x = 0..7 in t[x], p[-1,y] for y = 0..3 in l[y], p[-1,-1] = m
  function automatic int p4(int t[8], int l[4], int m, int x, int y);
    if (y == -1) return (x == -1) ? m : t[x];
    return l[y];
  endfunction

  // returns pred of 'mode' for pixel (x,y); t[] must already hold the
  // substituted E..H when they are unavailable
  function automatic int ref_i4_pix(int mode, int t[8], int l[4], int m,
                                    bit tv, bit lv, int x, int y);
    int z;
    case (mode)
      0: return t[x];
      1: return l[y];
      2: begin
        int st, sl;
        st = t[0] + t[1] + t[2] + t[3];
        sl = l[0] + l[1] + l[2] + l[3];
        if (tv && lv) return (st + sl + 4) >> 3;
        if (tv)       return (st + 2) >> 2;
        if (lv)       return (sl + 2) >> 2;
        return 128;
      end
      3: begin
        if (x == 3 && y == 3) return (p4(t,l,m,6,-1) + 3*p4(t,l,m,7,-1) + 2) >> 2;
        return (p4(t,l,m,x+y,-1) + 2*p4(t,l,m,x+y+1,-1) + p4(t,l,m,x+y+2,-1) + 2) >> 2;
      end
      4: begin
        if (x > y) return (p4(t,l,m,x-y-2,-1) + 2*p4(t,l,m,x-y-1,-1) + p4(t,l,m,x-y,-1) + 2) >> 2;
        if (x < y) return (p4(t,l,m,-1,y-x-2) + 2*p4(t,l,m,-1,y-x-1) + p4(t,l,m,-1,y-x) + 2) >> 2;
        return (p4(t,l,m,0,-1) + 2*p4(t,l,m,-1,-1) + p4(t,l,m,-1,0) + 2) >> 2;
      end
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0)
          return (p4(t,l,m,x-(y>>1)-1,-1) + p4(t,l,m,x-(y>>1),-1) + 1) >> 1;
        if (z > 0)
          return (p4(t,l,m,x-(y>>1)-2,-1) + 2*p4(t,l,m,x-(y>>1)-1,-1) + p4(t,l,m,x-(y>>1),-1) + 2) >> 2;
        if (z == -1)
          return (p4(t,l,m,-1,0) + 2*p4(t,l,m,-1,-1) + p4(t,l,m,0,-1) + 2) >> 2;
        return (p4(t,l,m,-1,y-1) + 2*p4(t,l,m,-1,y-2) + p4(t,l,m,-1,y-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0)
          return (p4(t,l,m,-1,y-(x>>1)-1) + p4(t,l,m,-1,y-(x>>1)) + 1) >> 1;
        if (z > 0)
          return (p4(t,l,m,-1,y-(x>>1)-2) + 2*p4(t,l,m,-1,y-(x>>1)-1) + p4(t,l,m,-1,y-(x>>1)) + 2) >> 2;
        if (z == -1)
          return (p4(t,l,m,-1,0) + 2*p4(t,l,m,-1,-1) + p4(t,l,m,0,-1) + 2) >> 2;
        return (p4(t,l,m,x-1,-1) + 2*p4(t,l,m,x-2,-1) + p4(t,l,m,x-3,-1) + 2) >> 2;
      end
      7: begin
        if (y % 2 == 0)
          return (p4(t,l,m,x+(y>>1),-1) + p4(t,l,m,x+(y>>1)+1,-1) + 1) >> 1;
        return (p4(t,l,m,x+(y>>1),-1) + 2*p4(t,l,m,x+(y>>1)+1,-1) + p4(t,l,m,x+(y>>1)+2,-1) + 2) >> 2;
      end
      default: begin
        z = x + 2*y;
        if (z > 5)  return p4(t,l,m,-1,3);
        if (z == 5) return (p4(t,l,m,-1,2) + 3*p4(t,l,m,-1,3) + 2) >> 2;
        if (z % 2 == 0)
          return (p4(t,l,m,-1,y+(x>>1)) + p4(t,l,m,-1,y+(x>>1)+1) + 1) >> 1;
        return (p4(t,l,m,-1,y+(x>>1)) + 2*p4(t,l,m,-1,y+(x>>1)+1) + p4(t,l,m,-1,y+(x>>1)+2) + 2) >> 2;
      end
    endcase
  endfunction

  // availability of 4x4 mode from group valids
  function automatic bit ref_i4_ok(int mode, bit tv, bit lv, bit mv);
    case (mode)
      0, 3, 7: return tv;
      1, 8:    return lv;
      2:       return 1'b1;
      default: return tv && lv && mv;
    endcase
  endfunction

  // ------------------------------------------------------------ NxN 4-mode
  function automatic int pn(int t[16], int l[16], int m, int x, int y);
    if (y == -1) return (x == -1) ? m : t[x];
    return l[y];
  endfunction

  // n = 16 (luma) or 8 (chroma); t/l hold n valid entries
  function automatic int ref_plane_pix(int n, int mode, int t[16], int l[16], int m,
                                       bit tv, bit lv, int x, int y);
    int st, sl, hh, vv, a, b, c, xc, lg;
    case (mode)
      0: return t[x];
      1: return l[y];
      2: begin
        st = 0; sl = 0;
        for (int i = 0; i < n; i++) begin st += t[i]; sl += l[i]; end
        lg = (n == 16) ? 4 : 3;
        if (tv && lv) return (st + sl + n) >> (lg + 1);
        if (tv)       return (st + n/2) >> lg;
        if (lv)       return (sl + n/2) >> lg;
        return 128;
      end
      default: begin
        if (n == 16) begin
          hh = 0; vv = 0;
          for (int xp = 0; xp <= 7; xp++) hh += (xp + 1) * (pn(t,l,m,8+xp,-1) - pn(t,l,m,6-xp,-1));
          for (int yp = 0; yp <= 7; yp++) vv += (yp + 1) * (pn(t,l,m,-1,8+yp) - pn(t,l,m,-1,6-yp));
          a = 16 * (pn(t,l,m,-1,15) + pn(t,l,m,15,-1));
          b = (5 * hh + 32) >>> 6;
          c = (5 * vv + 32) >>> 6;
          return clip255((a + b*(x-7) + c*(y-7) + 16) >>> 5);
        end else begin
          hh = 0; vv = 0;
          for (int xp = 0; xp <= 3; xp++) hh += (xp + 1) * (pn(t,l,m,4+xp,-1) - pn(t,l,m,2-xp,-1));
          for (int yp = 0; yp <= 3; yp++) vv += (yp + 1) * (pn(t,l,m,-1,4+yp) - pn(t,l,m,-1,2-yp));
          a = 16 * (pn(t,l,m,-1,7) + pn(t,l,m,7,-1));
          b = (34 * hh + 32) >>> 6;
          c = (34 * vv + 32) >>> 6;
          xc = 3;
          return clip255((a + b*(x-xc) + c*(y-xc) + 16) >>> 5);
        end
      end
    endcase
  endfunction

  // ------------------------------------------------------------ transform / quant
  localparam int CFM [4][4] = '{ '{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1} };

  // Y = (Cf X) Cf^T
  function automatic blk16_t ref_fwd(blk16_t xin);
    int t [4][4];
    blk16_t y;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += CFM[i][k] * xin[4*k+j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        y[4*i+j] = 0;
        for (int k = 0; k < 4; k++) y[4*i+j] += t[i][k] * CFM[j][k];
      end
    return y;
  endfunction

  function automatic blk16_t ref_quant(blk16_t y, int qp, bit intra);
    blk16_t z;
    int qbits;
    longint f, a;
    qbits = 15 + qp / 6;
    f = intra ? ((64'd1 << qbits) / 3) : ((64'd1 << qbits) / 6);
    for (int i = 0; i < 16; i++) begin
      a = longint'(y[i]);
      if (a < 0) a = -a;
      a = (a * MF_T[qp % 6][col_of(i / 4, i % 4)] + f) >> qbits;
      z[i] = (y[i] < 0) ? -int'(a) : int'(a);
    end
    return z;
  endfunction

  function automatic blk16_t ref_dequant(blk16_t z, int qp);
    blk16_t w;
    for (int i = 0; i < 16; i++)
      w[i] = z[i] * V_T[qp % 6][col_of(i / 4, i % 4)] * (1 << (qp / 6));
    return w;
  endfunction

  // inverse transform, H.264 8.5.12.2 naming: rows (e,f), columns (g,h)
  function automatic blk16_t ref_inv(blk16_t d);
    int f [4][4];
    int h [4][4];
    blk16_t r;
    for (int i = 0; i < 4; i++) begin
      int e0, e1, e2, e3;
      e0 = d[4*i+0] + d[4*i+2];
      e1 = d[4*i+0] - d[4*i+2];
      e2 = (d[4*i+1] >>> 1) - d[4*i+3];
      e3 = d[4*i+1] + (d[4*i+3] >>> 1);
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
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) r[4*i+j] = (h[i][j] + 32) >>> 6;
    return r;
  endfunction

endpackage
