// Workload testbench: one full 320x200 frame, the display size the renderer
// is meant for, through r3d_top at its default size.
//
// A scene of random triangles (small to about 90 pixels, some covering many
// tiles, overlapping in depth) is placed on the screen. As the host would,
// the testbench sorts the triangles into the 10 x 13 tiles of 32x16 pixels
// (a triangle goes to every tile its bounding box touches; a tile with none
// gets one empty record) and streams the tiles in raster order. A model of
// the vertex data memory answers the vertex-data reads with vertex positions
// and attribute values taken from random planes.
// Checked: every pixel the reference model finds covered comes out exactly
// once, with the visible triangle and its Z, and colour channel 0 equals the
// plane the design built for it. Reported: plane setups and cache hits, the
// clocks the frame took, and from that the frame rate at the document's
// 20 MHz clock. The check fails if any tile is
// never finished.
module tb_r3d_frame;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  import tb_fp_pkg::*;
  localparam int SCR_W = 320, SCR_H = 200;
  localparam int NTX = (SCR_W + TILE_W - 1) / TILE_W;
  localparam int NTY = (SCR_H + TILE_H - 1) / TILE_H;
  localparam int NTRI = 160;
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

  // scene
  int sx [NTRI][3], sy [NTRI][3];
  real sz [NTRI][3];
  tri_attr_t amem [tri_idx_t];
  tri_attr_t used [tri_idx_t];
  int n_setup = 0, n_hit = 0;
  always @(posedge clk) if (attr_rd_en) begin
    tri_vtx_t v;
    v.cube = 1'b0;
    for (int k = 0; k < 3; k++) begin
      v.x[k] = coord_t'(sx[attr_rd_idx][k]);
      v.y[k] = coord_t'(sy[attr_rd_idx][k]);
      for (int j = 0; j < N_ATTR; j++) begin
        plane_t pl;
        pl = j == 0 ? amem[attr_rd_idx].s : j == 1 ? amem[attr_rd_idx].t : j == 2 ? amem[attr_rd_idx].r
           : j == 3 ? amem[attr_rd_idx].rhw : amem[attr_rd_idx].col[j - 4];
        v.p[j][k] = r2f(f2r(pl.a) * real'(v.x[k]) + f2r(pl.b) * real'(v.y[k]) + f2r(pl.c));
      end
    end
    attr_rd_data <= v;
  end
  always @(posedge clk) if (rst_n && dut.c_we) begin
    used[dut.q.idx] = dut.wattr;
    n_setup++;
  end
  always @(posedge clk) if (rst_n && dut.fst == 3'd1) n_hit++;

  typedef struct { tri_idx_t idx; zbuf_t z; int seen; } vis_t;
  vis_t vis [int];
  int finished = 0, n_pix = 0, t_first = -1, t_last = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tile_finished) begin finished++; t_last = cyc; end
    if (tri_valid && tri_ready && t_first < 0) t_first = cyc;
  end

  always @(posedge clk) if (rst_n && pix_valid && pix.covered) begin
    int key;
    key = int'(pix.y) * 4096 + int'(pix.x);
    checks++;
    n_pix++;
    if (!vis.exists(key) || vis[key].idx != pix.idx || vis[key].z != pix.z) begin
      failures++;
      if (failures < 10) $display("pixel %0d,%0d: idx %0d z %h not expected", pix.x, pix.y, pix.idx, pix.z);
    end else begin
      real a, b, c, e, d;
      vis[key].seen++;
      a = f2r(used[pix.idx].col[0].a) * real'(pix.x);
      b = f2r(used[pix.idx].col[0].b) * real'(pix.y);
      c = f2r(used[pix.idx].col[0].c);
      e = a + b + c;
      d = f2r(pix.col[0]) - e;
      checks++;
      if (d > 1e-5 || d < -1e-5) begin
        failures++;
        if (failures < 10) $display("pixel %0d,%0d colour %g expected %g", pix.x, pix.y, f2r(pix.col[0]), e);
      end
    end
  end

  // scene, binned per tile
  tri_in_t tiles [NTY][NTX][$];

  initial begin
    tile_ref_t r;
    int n_bin, n_empty;
    tri_i = '0;
    for (int i = 0; i < NTRI; i++) begin
      int cx, cy, sz_max;
      sz_max = (i % 8 == 0) ? 90 : 30;
      cx = int'($urandom_range(SCR_W - 1));
      cy = int'($urandom_range(SCR_H - 1));
      for (int k = 0; k < 3; k++) begin
        sx[i][k] = cx + int'($urandom_range(2 * sz_max)) - sz_max;
        sy[i][k] = cy + int'($urandom_range(sz_max)) - sz_max / 2;
        if (sx[i][k] < 0) sx[i][k] = 0;
        if (sx[i][k] > SCR_W - 1) sx[i][k] = SCR_W - 1;
        if (sy[i][k] < 0) sy[i][k] = 0;
        if (sy[i][k] > SCR_H - 1) sy[i][k] = SCR_H - 1;
        sz[i][k] = 0.05 + 0.9 * real'($urandom_range(1000)) / 1000.0;
      end
      begin
        tri_attr_t at;
        at = '0;
        at.s = '{a: rand_f(-10, -7), b: rand_f(-10, -7), c: r2f(1.0)};
        at.t = '{a: rand_f(-10, -7), b: rand_f(-10, -7), c: r2f(1.0)};
        at.r = '{a: 32'd0, b: 32'd0, c: r2f(1.0)};
        at.rhw = '{a: 32'd0, b: 32'd0, c: r2f(1.0)};
        for (int c = 0; c < N_COLOR; c++)
          at.col[c] = '{a: rand_f(-12, -9), b: rand_f(-12, -9), c: r2f(0.5)};
        amem[tri_idx_t'(i)] = at;
      end
    end
    n_bin = 0; n_empty = 0;
    for (int ty = 0; ty < NTY; ty++)
      for (int tx = 0; tx < NTX; tx++) begin
        int x0, y0;
        x0 = tx * TILE_W; y0 = ty * TILE_H;
        for (int i = 0; i < NTRI; i++) begin
          int xmin, xmax, ymin, ymax;
          xmin = sx[i][0]; xmax = sx[i][0]; ymin = sy[i][0]; ymax = sy[i][0];
          for (int k = 1; k < 3; k++) begin
            if (sx[i][k] < xmin) xmin = sx[i][k];
            if (sx[i][k] > xmax) xmax = sx[i][k];
            if (sy[i][k] < ymin) ymin = sy[i][k];
            if (sy[i][k] > ymax) ymax = sy[i][k];
          end
          if (xmax >= x0 && xmin < x0 + TILE_W && ymax >= y0 && ymin < y0 + TILE_H) begin
            tiles[ty][tx].push_back(make_tri(sx[i], sy[i], sz[i], x0, y0, i));
            n_bin++;
          end
        end
        if (tiles[ty][tx].size() == 0) begin
          tri_in_t e;
          e = make_tri('{x0, x0 + 1, x0}, '{y0, y0, y0 + 1}, '{0.5, 0.5, 0.5}, x0, y0, 0);
          e.empty = 1;
          tiles[ty][tx].push_back(e);
          n_empty++;
        end
        tiles[ty][tx][0].first = 1;
        tiles[ty][tx][tiles[ty][tx].size() - 1].last = 1;
        if (tiles[ty][tx][0].empty) begin
          for (int y = 0; y < TILE_H; y++)
            for (int x = 0; x < TILE_W; x++) r.idx[y][x] = NO_TRI;
        end else
          ref_tile(tiles[ty][tx], r);
        for (int y = 0; y < TILE_H; y++)
          for (int x = 0; x < TILE_W; x++)
            if (r.idx[y][x] != NO_TRI) begin
              vis_t v;
              v.idx = r.idx[y][x]; v.z = r.z[y][x]; v.seen = 0;
              vis[(y0 + y) * 4096 + x0 + x] = v;
            end
      end
    $display("scene: %0d triangles, %0d tile records, %0d empty tiles, %0d covered pixels",
             NTRI, n_bin, n_empty, vis.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ty = 0; ty < NTY; ty++)
      for (int tx = 0; tx < NTX; tx++)
        foreach (tiles[ty][tx][i]) begin
          @(negedge clk);
          tri_valid = 1; tri_i = tiles[ty][tx][i];
          while (!tri_ready) @(negedge clk);
          @(negedge clk) tri_valid = 0;
        end
    wait (finished == NTX * NTY);
    repeat (40) @(posedge clk);
    checks++;
    begin
      int bad;
      bad = 0;
      foreach (vis[key]) if (vis[key].seen != 1) bad++;
      if (bad != 0) begin failures++; $display("%0d covered pixels not delivered exactly once", bad); end
    end
    $display("frame: %0d tiles, %0d pixels shaded, %0d clocks -> %0.1f frames/s at 20 MHz",
             finished, n_pix, t_last - t_first, 20.0e6 / real'(t_last - t_first));
    $display("plane setups %0d, plane cache hits %0d", n_setup, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
