// Testbench for hsr_unit: streams tiles of random triangles (one of them an
// empty tile), plays the part of the grouping unit (reads a finished bank
// through the reader port, then releases it, sometimes after a long pause),
// and compares every pixel's triangle index and Z with the reference tile.
// Also checked: one triangle accepted per 34-clock step, a tile finishes at
// most (triangles + 16 + 2) steps after its first triangle, consecutive tiles
// overlap in the cell chain, and a tile waits while its bank is still owned
// by the reader.
module tb_hsr_unit;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic tri_valid = 0, tri_ready;
  tri_in_t tri_i;
  logic tile_done, tile_valid, tile_bank, gu_bank = 0, tile_release = 0, idle;
  coord_t tile_x, tile_y;
  logic [4:0] gu_addr = 0;
  zbuf_t    [TILE_H-1:0] gu_z;
  tri_idx_t [TILE_H-1:0] gu_idx;

  hsr_unit dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d triangles accepted, %0d tiles done", accepted, done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tri_in_t   tiles [NT][$];
  tile_ref_t refs [NT];
  int first_cyc [NT];
  int done_cnt = 0, overlap = 0, bank_wait = 0, accepted = 0, acc_gap_bad = 0;

  int done_cyc [NT];
  int ndone = 0, nfirst = 0, acc_cyc [$];
  always @(posedge clk) if (rst_n) begin
    if (tile_done) begin
      done_cyc[ndone] <= cyc;
      ndone <= ndone + 1;
    end
    if (tri_valid && tri_ready) begin
      // one triangle per step: any two accepts two apart are a step apart
      if (acc_cyc.size() >= 2 && cyc - acc_cyc[acc_cyc.size() - 2] < TILE_W + 2) acc_gap_bad++;
      acc_cyc.push_back(cyc);
      accepted <= accepted + 1;
      if (tri_i.first) begin
        first_cyc[nfirst] <= cyc;
        if (ndone < nfirst) overlap <= overlap + 1;
        nfirst <= nfirst + 1;
      end
    end
    if (tri_valid && !tri_ready && tri_i.first && !idle) bank_wait <= bank_wait + 1;
  end

  // driver
  initial begin
    tri_i = '0;
    for (int t = 0; t < NT; t++) begin
      int n, tx, ty;
      n  = (t == 2) ? 12 : 1 + int'($urandom_range(9));
      tx = 32 * int'($urandom_range(9));
      ty = 16 * int'($urandom_range(11));
      if (t == 5) begin
        tri_in_t e;
        e = rand_tri(tx, ty, 0, 8);
        e.empty = 1;
        tiles[t].push_back(e);
      end else
        for (int i = 0; i < n; i++) tiles[t].push_back(rand_tri(tx, ty, t * 16 + i, 10));
      tiles[t][0].first = 1;
      tiles[t][tiles[t].size() - 1].last = 1;
      ref_tile(tiles[t], refs[t]);
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
  end

  // reader
  initial begin
    @(posedge rst_n);
    for (int t = 0; t < NT; t++) begin
      int ntri;
      bit bad;
      @(posedge clk iff tile_valid);
      @(negedge clk);
      ntri = tiles[t].size();
      $display("tile %0d: %0d triangles, first accepted %0d, done %0d", t, ntri, first_cyc[t], done_cyc[t]);
      done_cnt++;
      checks++;
      if (done_cyc[t] - first_cyc[t] > (ntri + TILE_H + 2) * (TILE_W + 2)) begin
        failures++; $display("tile %0d took %0d clocks", t, done_cyc[t] - first_cyc[t]);
      end
      checks++;
      if (tile_x !== tiles[t][0].tile_x || tile_y !== tiles[t][0].tile_y) begin
        failures++; $display("tile %0d origin %0d,%0d", t, tile_x, tile_y);
      end
      bad = 0;
      for (int x = 0; x < TILE_W; x++) begin
        @(negedge clk); gu_bank = tile_bank; gu_addr = 5'(x);
        @(negedge clk);
        for (int y = 0; y < TILE_H; y++)
          if (gu_idx[y] !== refs[t].idx[y][x] || gu_z[y] !== refs[t].z[y][x]) begin
            bad = 1;
            if (!bad) $display("tile %0d (%0d,%0d): idx %0d z %h, expected %0d %h",
                                       t, x, y, gu_idx[y], gu_z[y], refs[t].idx[y][x], refs[t].z[y][x]);
          end
      end
      checks++; if (bad) failures++;
      // hold the bank for a while on some tiles so the front end must wait
      if (t % 3 == 1) repeat (2000) @(posedge clk);
      @(negedge clk); tile_release = 1;
      @(negedge clk); tile_release = 0;
    end
    repeat (100) @(posedge clk);
    checks += 4;
    if (overlap == 0)     begin failures++; $display("tiles never overlapped"); end
    if (bank_wait == 0)   begin failures++; $display("front end never waited for a bank"); end
    if (acc_gap_bad != 0) begin failures++; $display("%0d triangles accepted faster than one per step", acc_gap_bad); end
    if (!idle)            begin failures++; $display("not idle at the end"); end
    $display("overlapping tiles %0d, clocks waiting for a bank %0d, triangles %0d", overlap, bank_wait, accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
