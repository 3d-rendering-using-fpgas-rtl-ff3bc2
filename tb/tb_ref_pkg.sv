// tb_ref_pkg: reference models and stimulus generators shared by the
// testbenches. Coverage and Z are evaluated directly per pixel from the
// triangle's vertex data (no incremental stepping), and triangles are drawn
// at random around a tile with their slopes and Z plane worked out here.
package tb_ref_pkg;
  import r3d_pkg::*;

  function automatic fix16_t ref_edge(coord_t xa, coord_t ya, fix16_t a, int y);
    longint p;
    p = longint'(a) * longint'(y - int'(ya));
    return fix16_t'((int'(xa) <<< XFRAC) + int'(p[31:0]));
  endfunction

  function automatic mode_y_t ref_mode(int y, tri_in_t t);
    if (y == int'(t.y0)) return MODE_TOP;
    if (y == int'(t.y2)) return MODE_BOT;
    if (y > int'(t.y0) && y <= int'(t.y1)) return MODE_UPPER;
    if (y > int'(t.y1) && y < int'(t.y2))  return MODE_LOWER;
    return MODE_OUT;
  endfunction

  function automatic bit ref_cover(tri_in_t t, int x, int y);
    fix16_t e0, e1, e2, xf;
    longint lo, hi;
    if (t.empty) return 0;
    e0 = ref_edge(t.x1, t.y1, t.a0, y);
    e1 = ref_edge(t.x0, t.y0, t.a1, y);
    e2 = ref_edge(t.x2, t.y2, t.a2, y);
    xf = fix16_t'(x <<< XFRAC);
    case (ref_mode(y, t))
      MODE_UPPER: return xf >= ((e0 < e1) ? e0 : e1) && xf < ((e0 < e1) ? e1 : e0);
      MODE_LOWER: return xf >= ((e1 < e2) ? e1 : e2) && xf < ((e1 < e2) ? e2 : e1);
      MODE_TOP: begin
        if (t.y0 == t.y1) return xf >= ((e0 < e1) ? e0 : e1) && xf <= ((e0 < e1) ? e1 : e0);
        return x == int'(t.x0);
      end
      MODE_BOT: return x == int'(t.x2);
      default: return 0;
    endcase
  endfunction

  function automatic zval_t ref_z(tri_in_t t, int x, int y);
    longint px, py;
    px = longint'(t.e) * longint'(x);
    py = longint'(t.f) * longint'(y);
    return zval_t'(int'(px[31:0]) + int'(py[31:0]) + int'(t.g));
  endfunction

  function automatic fix16_t slope(int xa, int ya, int xb, int yb);
    if (ya == yb) return '0;
    return fix16_t'(((xb - xa) * 65536) / (yb - ya));
  endfunction

  // triangle record for tile (tx, ty) from three vertices with their Z
  function automatic tri_in_t make_tri(int xs_in[3], int ys_in[3], real zs_in[3], int tx, int ty, int idx);
    tri_in_t t;
    int xs[3], ys[3], tmp;
    real zs[3], az, bz, cz, dz;
    xs = xs_in; ys = ys_in; zs = zs_in;
    // sort by growing y
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2 - i; j++)
        if (ys[j] > ys[j+1]) begin
          tmp = ys[j]; ys[j] = ys[j+1]; ys[j+1] = tmp;
          tmp = xs[j]; xs[j] = xs[j+1]; xs[j+1] = tmp;
          dz = zs[j]; zs[j] = zs[j+1]; zs[j+1] = dz;
        end
    t = '0;
    t.idx = tri_idx_t'(idx);
    t.tile_x = coord_t'(tx); t.tile_y = coord_t'(ty);
    t.x0 = coord_t'(xs[0]); t.y0 = coord_t'(ys[0]);
    t.x1 = coord_t'(xs[1]); t.y1 = coord_t'(ys[1]);
    t.x2 = coord_t'(xs[2]); t.y2 = coord_t'(ys[2]);
    t.a0 = slope(xs[0], ys[0], xs[1], ys[1]);
    t.a1 = slope(xs[0], ys[0], xs[2], ys[2]);
    t.a2 = slope(xs[1], ys[1], xs[2], ys[2]);
    // plane through the three vertices
    az = real'(ys[1]-ys[2])*(zs[1]-zs[0]) - (zs[1]-zs[2])*real'(ys[1]-ys[0]);
    bz = (zs[1]-zs[2])*real'(xs[1]-xs[0]) - real'(xs[1]-xs[2])*(zs[1]-zs[0]);
    cz = real'(xs[1]-xs[2])*real'(ys[1]-ys[0]) - real'(ys[1]-ys[2])*real'(xs[1]-xs[0]);
    if (cz == 0.0) begin
      t.e = '0; t.f = '0; t.g = zval_t'(longint'(zs[0] * 16777216.0));
    end else begin
      dz = -(az*real'(xs[1]) + bz*real'(ys[1]) + cz*zs[1]);
      t.e = zval_t'(longint'(-az/cz * 16777216.0));
      t.f = zval_t'(longint'(-bz/cz * 16777216.0));
      t.g = zval_t'(longint'(-dz/cz * 16777216.0));
    end
    return t;
  endfunction

  // random triangle around the tile at (tx, ty); vertex z in [0.05, 0.95)
  function automatic tri_in_t rand_tri(int tx, int ty, int idx, int spread);
    int xs[3], ys[3];
    real zs[3];
    for (int i = 0; i < 3; i++) begin
      xs[i] = tx - spread + int'($urandom_range(TILE_W + 2*spread));
      ys[i] = ty - spread/2 + int'($urandom_range(TILE_H + spread));
      zs[i] = 0.05 + 0.9 * real'($urandom_range(1000)) / 1000.0;
    end
    return make_tri(xs, ys, zs, tx, ty, idx);
  endfunction

  // ---- tile model: visible triangle and Z of every pixel
  typedef struct {
    tri_idx_t idx [TILE_H][TILE_W];
    zbuf_t    z   [TILE_H][TILE_W];
  } tile_ref_t;

  function automatic void ref_tile(ref tri_in_t tris[$], ref tile_ref_t r);
    zval_t z;
    for (int y = 0; y < TILE_H; y++)
      for (int x = 0; x < TILE_W; x++) begin
        r.idx[y][x] = NO_TRI;
        r.z[y][x]   = Z_FAR;
      end
    foreach (tris[i])
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++) begin
          int sx, sy;
          sx = int'(tris[i].tile_x) + x;
          sy = int'(tris[i].tile_y) + y;
          if (ref_cover(tris[i], sx, sy)) begin
            z = ref_z(tris[i], sx, sy);
            if (i == 0 || longint'(z) < longint'({1'b0, r.z[y][x]})) begin
              r.idx[y][x] = tris[i].idx;
              r.z[y][x]   = z[ZBUF_W-1:0];
            end
          end
        end
  endfunction
endpackage
