// tb_ref_pkg: reference models shared by the testbenches.
//
// overlaps() decides by the separating-axis test whether the closed triangle
// (integer vertices) and the closed segment rectangle
// [sx*SW, (sx+1)*SW] x [sy*SH, (sy+1)*SH] share a point: they are disjoint
// exactly when the two coordinate axes or one of the triangle's edge normals
// separate them. It works on the raw vertices in 64-bit arithmetic and does
// not use the edge-function stepping of the design.
//
// make_setup() builds the setup record the input pipeline should produce for a
// triangle, from the definitions: vertices sorted by Y (stable), segments of
// the vertices, edge deltas Dx = x_first - x_second, Dy likewise, A at the
// corners of the first segment, each side negated when the opposite vertex
// lies on its negative side.
package tb_ref_pkg;
  import seg_pkg::*;

  function automatic longint cross3(longint ax, longint ay, longint bx, longint by,
                                    longint px, longint py);
    return (bx - ax) * (py - ay) - (by - ay) * (px - ax);
  endfunction

  function automatic bit degenerate(int x[3], int y[3]);
    return cross3(x[0], y[0], x[1], y[1], x[2], y[2]) == 0;
  endfunction

  function automatic bit overlaps(int x[3], int y[3], int sx, int sy, int wl, int hl);
    longint x0, x1, y0, y1, cx[4], cy[4], s, e;
    int xmin, xmax, ymin, ymax;
    bit sep;
    x0 = longint'(sx) << wl; x1 = longint'(sx + 1) << wl;
    y0 = longint'(sy) << hl; y1 = longint'(sy + 1) << hl;
    xmin = x[0]; xmax = x[0]; ymin = y[0]; ymax = y[0];
    for (int i = 1; i < 3; i++) begin
      if (x[i] < xmin) xmin = x[i];
      if (x[i] > xmax) xmax = x[i];
      if (y[i] < ymin) ymin = y[i];
      if (y[i] > ymax) ymax = y[i];
    end
    if (xmax < x0 || xmin > x1 || ymax < y0 || ymin > y1) return 0;
    cx = '{x0, x1, x1, x0};
    cy = '{y0, y0, y1, y1};
    for (int i = 0; i < 3; i++) begin
      int j, k;
      j = (i + 1) % 3; k = (i + 2) % 3;
      s = cross3(x[i], y[i], x[j], y[j], x[k], y[k]);
      sep = 1;
      for (int c = 0; c < 4; c++) begin
        e = cross3(x[i], y[i], x[j], y[j], cx[c], cy[c]);
        if ((s > 0 && e >= 0) || (s < 0 && e <= 0)) sep = 0;
      end
      if (sep) return 0;
    end
    return 1;
  endfunction

  function automatic void make_setup(int xi[3], int yi[3], int unsigned ptr, int wl, int hl,
                                     output tri_setup_t st, output bit degen);
    int x[3], y[3], t, xmin, xmax, ca, ra, xtl, ytl;
    int i0[3], i1[3];
    longint dx, dy, atl, opp, sgn;
    x = xi; y = yi;
    // stable sort by y
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2 - a; b++)
        if (y[b + 1] < y[b]) begin
          t = y[b]; y[b] = y[b + 1]; y[b + 1] = t;
          t = x[b]; x[b] = x[b + 1]; x[b + 1] = t;
        end
    xmin = x[0]; xmax = x[0];
    for (int i = 1; i < 3; i++) begin
      if (x[i] < xmin) xmin = x[i];
      if (x[i] > xmax) xmax = x[i];
    end
    st = '0;
    st.ptr = ptr;
    ca = x[0] >> wl;
    ra = (y[0] == 0) ? 0 : (y[0] - 1) >> hl;
    st.col_a = segc_t'(ca);
    st.row_a = segc_t'(ra);
    st.row_c = segc_t'(y[2] >> hl);
    st.col_l = segc_t'((xmin == 0) ? 0 : (xmin - 1) >> wl);
    st.col_r = segc_t'(xmax >> wl);
    xtl = ca << wl; ytl = ra << hl;
    i0 = '{0, 0, 1};
    i1 = '{1, 2, 2};
    degen = cross3(x[0], y[0], x[1], y[1], x[2], y[2]) == 0;
    for (int k = 0; k < 3; k++) begin
      int o;
      o = 3 - i0[k] - i1[k];   // opposite vertex
      dx = x[i0[k]] - x[i1[k]];
      dy = y[i0[k]] - y[i1[k]];
      opp = longint'(x[o] - x[i0[k]]) * dy - longint'(y[o] - y[i0[k]]) * dx;
      sgn = (opp < 0) ? -1 : 1;
      dx *= sgn; dy *= sgn;
      atl = longint'(xtl - x[i0[k]]) * dy - longint'(ytl - y[i0[k]]) * dx;
      st.a_tl[k] = aval_t'(atl);
      st.a_tr[k] = aval_t'(atl + (dy << wl));
      st.dkx[k]  = aval_t'(dx << hl);
      st.dky[k]  = aval_t'(dy << wl);
    end
  endfunction

endpackage
