// End-to-end testbench for r3d_top at its default size: several tiles of
// random triangles (one tile empty, some triangles cube mapped) go in; a
// model of the vertex data memory answers the shading-data reads. Every
// covered pixel the reference finds visible must come out exactly once, with
// the right triangle and Z, colours equal to the plane equations, and u, v
// equal to s/RHW, t/RHW (or to the cube face coordinates) within the
// precision of the floating-point pipeline. Also counted, each of which must
// happen: tiles overlapping in the HSR, the front end waiting for a bank,
// 2x2 blocks only partly covered, shading data reused and re-read, cube and
// plain pixels, all six cube faces, and the empty tile.
// The memory model holds vertex positions and attribute values, taken from
// random planes; each plane the design builds (attribute setup, written to
// its plane cache) must match the generating plane at the triangle's
// vertices and centre, and the pixels are checked against the plane the
// design built. One triangle spans two tiles so that its planes are found
// in the cache the second time; also counted: setups and cache hits.
module tb_r3d_top;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  import tb_fp_pkg::*;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic      tri_valid = 0, tri_ready, attr_rd_en, pix_valid, tile_finished, hsr_idle;
  tri_in_t   tri_i;
  tri_idx_t  attr_rd_idx;
  tri_vtx_t  attr_rd_data;
  pix_out_t  pix;
  r3d_top dut (.*);

  // ---- planes built by the design, checked against the generating planes
  tri_in_t   tris [tri_idx_t];
  tri_attr_t amem [tri_idx_t];   // generating planes
  tri_attr_t used [tri_idx_t];
  int n_setup = 0, n_hit = 0;
  function automatic real pdiff(plane_t a, plane_t b, real x, real y, output real tol);
    real d, m;
    d = (f2r(a.a) - f2r(b.a)) * x + (f2r(a.b) - f2r(b.b)) * y + (f2r(a.c) - f2r(b.c));
    m = (f2r(b.a) < 0 ? -f2r(b.a) : f2r(b.a)) * (x < 0 ? -x : x)
      + (f2r(b.b) < 0 ? -f2r(b.b) : f2r(b.b)) * (y < 0 ? -y : y)
      + (f2r(b.c) < 0 ? -f2r(b.c) : f2r(b.c));
    tol = 1e-5 + m * 2e-6;
    return d < 0 ? -d : d;
  endfunction
  always @(posedge clk) if (rst_n && dut.c_we) begin
    tri_in_t tr;
    tri_attr_t w, o;
    real xs[4], ys[4], d, tol;
    w = dut.wattr;
    tr = tris[dut.q.idx];
    o = amem[dut.q.idx];
    used[dut.q.idx] = w;
    n_setup++;
    // a zero-area triangle gets constant planes and is not compared
    xs = '{real'(tr.x0), real'(tr.x1), real'(tr.x2), (real'(tr.x0) + real'(tr.x1) + real'(tr.x2)) / 3.0};
    ys = '{real'(tr.y0), real'(tr.y1), real'(tr.y2), (real'(tr.y0) + real'(tr.y1) + real'(tr.y2)) / 3.0};
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < N_ATTR; j++) if (int'(tr.x1 - tr.x0) * int'(tr.y2 - tr.y0) != int'(tr.x2 - tr.x0) * int'(tr.y1 - tr.y0)) begin
        plane_t pw, po;
        pw = j == 0 ? w.s : j == 1 ? w.t : j == 2 ? w.r : j == 3 ? w.rhw : w.col[j - 4];
        po = j == 0 ? o.s : j == 1 ? o.t : j == 2 ? o.r : j == 3 ? o.rhw : o.col[j - 4];
        d = pdiff(pw, po, xs[k], ys[k], tol);
        checks++;
        if (d > tol || w.cube != o.cube) begin
          failures++;
          if (failures < 10) $display("setup plane %0d of triangle %0d off by %g at point %0d", j, dut.q.idx, d, k);
        end
      end
  end
  always @(posedge clk) if (rst_n && dut.fst == 3'd1) n_hit++;

  // ---- vertex data memory model
  always @(posedge clk) if (attr_rd_en) begin
    tri_in_t tr;
    tri_vtx_t v;
    real m;
    tr = tris[attr_rd_idx];
    v.cube = amem[attr_rd_idx].cube;
    v.x = {tr.x2, tr.x1, tr.x0};
    v.y = {tr.y2, tr.y1, tr.y0};
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < N_ATTR; j++) begin
        plane_t pl;
        pl = j == 0 ? amem[attr_rd_idx].s : j == 1 ? amem[attr_rd_idx].t : j == 2 ? amem[attr_rd_idx].r
           : j == 3 ? amem[attr_rd_idx].rhw : amem[attr_rd_idx].col[j - 4];
        v.p[j][k] = r2f(peval(pl, int'(v.x[k]), int'(v.y[k]), m));
      end
    attr_rd_data <= v;
  end

  function automatic plane_t rand_plane(int emin, int emax, real cmin, real cmax);
    plane_t p;
    p.a = rand_f(emin, emax);
    p.b = rand_f(emin, emax);
    p.c = r2f(cmin + (cmax - cmin) * real'($urandom_range(10000)) / 10000.0);
    return p;
  endfunction

  function automatic real peval(plane_t p, int x, int y, output real mag);
    real ax, by, c;
    ax = f2r(p.a) * real'(x); by = f2r(p.b) * real'(y); c = f2r(p.c);
    mag = (ax < 0 ? -ax : ax) + (by < 0 ? -by : by) + (c < 0 ? -c : c);
    return ax + by + c;
  endfunction

  // ---- expected visible pixels, keyed by screen position
  typedef struct { tri_idx_t idx; zbuf_t z; int seen; } vis_t;
  vis_t vis [int];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters
  int n_overlap = 0, n_bank_wait = 0, n_partial = 0, n_reload = 0, n_quads = 0;
  int n_cube = 0, n_plain = 0, n_empty_tiles = 0, faces [6];
  int tiles_started = 0, tiles_done = 0;
  logic [3:0] qcov;
  always @(posedge clk) if (rst_n) begin
    if (tri_valid && tri_ready && tri_i.first) begin
      if (tiles_done < tiles_started) n_overlap++;
      tiles_started++;
    end
    if (dut.u_hsr.tile_done) tiles_done++;
    if (tri_valid && !tri_ready && tri_i.first && !hsr_idle) n_bank_wait++;
    if (attr_rd_en) n_reload++;
    if (dut.q_valid && dut.q_ready) n_quads++;
  end

  // ---- pixel checker
  always @(posedge clk) if (rst_n && pix_valid) begin
    int key;
    qcov = {pix.covered, qcov[3:1]};
    if (pix.quad_last && qcov != 4'hf && qcov != 4'h0) n_partial++;
    if (pix.covered) begin
      key = int'(pix.y) * 4096 + int'(pix.x);
      checks++;
      if (!vis.exists(key) || vis[key].idx != pix.idx || vis[key].z != pix.z) begin
        failures++;
        if (failures < 10) $display("pixel %0d,%0d: idx %0d z %h not expected", pix.x, pix.y, pix.idx, pix.z);
      end else begin
        tri_attr_t at;
        real ms, mt, mr, mw, vs, vt, vr, vw, eu, ev, tol, mag, ma, esc, etc, d;
        int ef;
        bit tie;
        vis[key].seen++;
        at = used[pix.idx];
        vs = peval(at.s, pix.x, pix.y, ms);
        vt = peval(at.t, pix.x, pix.y, mt);
        vr = peval(at.r, pix.x, pix.y, mr);
        vw = peval(at.rhw, pix.x, pix.y, mw);
        tie = 0;
        if (!at.cube) begin
          n_plain++;
          eu = vs / vw * 65536.0; ev = vt / vw * 65536.0;
          tol = 4.0 + 65536.0 * 16.0 / 8388608.0 * ((ms + mt) / vw + (mw / vw) * ((vs < 0 ? -vs : vs) + (vt < 0 ? -vt : vt)) / vw);
          ef = 0;
        end else begin
          real as, att, ar;
          n_cube++;
          as = vs < 0 ? -vs : vs; att = vt < 0 ? -vt : vt; ar = vr < 0 ? -vr : vr;
          if (as >= att && as >= ar) begin
            ma = as; ef = vs >= 0 ? 0 : 1; esc = vs >= 0 ? -vr : vr; etc = -vt;
            tie = (as - att < as * 1e-5) || (as - ar < as * 1e-5);
          end else if (att >= ar) begin
            ma = att; ef = vt >= 0 ? 2 : 3; esc = vs; etc = vt >= 0 ? vr : -vr;
            tie = (att - ar < att * 1e-5) || (att - as < att * 1e-5);
          end else begin
            ma = ar; ef = vr >= 0 ? 4 : 5; esc = vr >= 0 ? vs : -vs; etc = -vt;
            tie = (ar - as < ar * 1e-5) || (ar - att < ar * 1e-5);
          end
          faces[ef]++;
          eu = esc / ma * 65536.0; ev = etc / ma * 65536.0;
          tol = 4.0 + 65536.0 * 16.0 / 8388608.0 * (ms + mt + mr) / ma * 2.0;
        end
        if (!tie) begin
          checks++;
          d = real'(pix.u) - eu; if (d < 0) d = -d;
          if (d > tol) begin failures++; if (failures < 10) $display("pixel %0d,%0d u %0d expected %g", pix.x, pix.y, pix.u, eu); end
          d = real'(pix.v) - ev; if (d < 0) d = -d;
          if (d > tol) begin failures++; if (failures < 10) $display("pixel %0d,%0d v %0d expected %g", pix.x, pix.y, pix.v, ev); end
          if (int'(pix.face) != ef) begin failures++; $display("pixel %0d,%0d face %0d expected %0d", pix.x, pix.y, pix.face, ef); end
        end
        for (int c = 0; c < N_COLOR; c++) begin
          real vc;
          vc = peval(at.col[c], pix.x, pix.y, mag);
          d = f2r(pix.col[c]) - vc; if (d < 0) d = -d;
          checks++;
          if (d > mag * 8.0 / 8388608.0) begin
            failures++; if (failures < 10) $display("pixel %0d,%0d colour %0d %g expected %g", pix.x, pix.y, c, f2r(pix.col[c]), vc);
          end
        end
      end
    end
  end

  int finished = 0;
  always @(posedge clk) if (rst_n && tile_finished) finished++;

  initial begin
    tri_in_t   tiles [NT][$];
    tile_ref_t r;
    int        ncube_tri;
    ncube_tri = 0;
    tri_i = '0;
    qcov = '0;
    for (int t = 0; t < NT; t++) begin
      int n, tx, ty;
      tx = 32 * (t % 4) + 64;
      ty = 16 * (t / 4) + 32;
      n  = (t == 1) ? 2 : 3 + int'($urandom_range(7));
      if (t == 4) begin
        tri_in_t e;
        e = rand_tri(tx, ty, 0, 8);
        e.empty = 1;
        tiles[t].push_back(e);
        n_empty_tiles++;
      end else
        for (int i = 0; i < n; i++) begin
          tri_in_t tr;
          tri_attr_t at;
          tr = rand_tri(tx, ty, t * 20 + i, 12);
          tiles[t].push_back(tr);
          tris[tr.idx] = tr;
          at.cube = (i % 2 == 1);
          if (at.cube) begin
            // aim each cube-mapped triangle at the next face in turn
            at.s = rand_plane(-12, -9, -1.0, 1.0);
            at.t = rand_plane(-12, -9, -1.0, 1.0);
            at.r = rand_plane(-12, -9, -1.0, 1.0);
            case (ncube_tri % 6)
              0: at.s.c = r2f(3.0);  1: at.s.c = r2f(-3.0);
              2: at.t.c = r2f(3.0);  3: at.t.c = r2f(-3.0);
              4: at.r.c = r2f(3.0);  default: at.r.c = r2f(-3.0);
            endcase
            ncube_tri++;
          end else begin
            at.s = rand_plane(-10, -7, -4.0, 4.0);
            at.t = rand_plane(-10, -7, -4.0, 4.0);
            at.r = rand_plane(-10, -7, -4.0, 4.0);
          end
          at.rhw = rand_plane(-16, -13, 0.5, 2.0);
          for (int c = 0; c < N_COLOR; c++) at.col[c] = rand_plane(-12, -9, 0.0, 1.0);
          amem[tr.idx] = at;
        end
      if (t == 5 || t == 6) begin
        // one near triangle across the border of tiles 5 and 6
        tri_in_t tr;
        tri_attr_t at;
        tr = make_tri('{116, 140, 124}, '{50, 52, 62}, '{0.02, 0.02, 0.02}, tx, ty, 119);
        tiles[t].push_back(tr);
        if (t == 5) begin
          tris[tr.idx] = tr;
          at.cube = 0;
          at.s = rand_plane(-10, -7, -4.0, 4.0);
          at.t = rand_plane(-10, -7, -4.0, 4.0);
          at.r = rand_plane(-10, -7, -4.0, 4.0);
          at.rhw = rand_plane(-16, -13, 0.5, 2.0);
          for (int c = 0; c < N_COLOR; c++) at.col[c] = rand_plane(-12, -9, 0.0, 1.0);
          amem[tr.idx] = at;
        end
      end
      tiles[t][0].first = 1;
      tiles[t][tiles[t].size() - 1].last = 1;
      ref_tile(tiles[t], r);
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++)
          if (r.idx[y][x] != NO_TRI) begin
            vis_t v;
            v.idx = r.idx[y][x]; v.z = r.z[y][x]; v.seen = 0;
            vis[(ty + y) * 4096 + tx + x] = v;
          end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++)
      foreach (tiles[t][i]) begin
        @(negedge clk);
        tri_valid = 1; tri_i = tiles[t][i];
        while (!tri_ready) @(negedge clk);
        @(negedge clk) tri_valid = 0;
      end
    wait (finished == NT);
    repeat (40) @(posedge clk);
    // every visible pixel delivered exactly once
    checks++;
    begin
      int bad;
      bad = 0;
      foreach (vis[key]) if (vis[key].seen != 1) bad++;
      if (bad != 0) begin failures++; $display("%0d visible pixels not delivered exactly once", bad); end
    end
    $display("pixels: %0d visible, %0d plain, %0d cube; faces %0d %0d %0d %0d %0d %0d",
             vis.size(), n_plain, n_cube, faces[0], faces[1], faces[2], faces[3], faces[4], faces[5]);
    $display("tile overlaps %0d, bank waits %0d, partial blocks %0d, blocks %0d, data reads %0d, empty tiles %0d, clocks %0d",
             n_overlap, n_bank_wait, n_partial, n_quads, n_reload, n_empty_tiles, cyc);
    $display("plane setups %0d, plane cache hits %0d", n_setup, n_hit);
    checks += 10;
    if (n_setup == 0) begin failures++; $display("attribute setup unused"); end
    if (n_hit == 0)   begin failures++; $display("plane cache never hit"); end
    if (n_overlap == 0)          begin failures++; $display("no tile overlap"); end
    if (n_bank_wait == 0)        begin failures++; $display("no bank wait"); end
    if (n_partial == 0)          begin failures++; $display("no partly covered block"); end
    if (n_reload >= n_quads)     begin failures++; $display("shading data never reused"); end
    if (n_reload == 0)           begin failures++; $display("shading data never read"); end
    if (n_cube == 0 || n_plain == 0) begin failures++; $display("cube or plain mode unused"); end
    if (n_empty_tiles == 0 || finished != NT) begin failures++; $display("tiles finished: %0d", finished); end
    if (faces[0] == 0 || faces[1] == 0 || faces[2] == 0 || faces[3] == 0 || faces[4] == 0 || faces[5] == 0)
      begin failures++; $display("a cube face was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
