// Testbench for grouping_unit: a model of the HSR line buffers offers random
// tiles (a few triangles in patches, some uncovered pixels), the output is
// taken with random back-pressure. Checked: every covered pixel is emitted
// exactly once with its triangle index and Z, no uncovered pixel is emitted,
// the blocks of one triangle come out as one unbroken run, the bank is
// released once per tile and tile_finished follows the last block.
module tb_grouping_unit;
  import r3d_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tile_valid = 0, tile_bank = 0, tile_release, gu_bank, q_valid, q_ready = 0, tile_finished;
  coord_t tile_x = 0, tile_y = 0;
  logic [4:0] gu_addr;
  zbuf_t    [TILE_H-1:0] gu_z;
  tri_idx_t [TILE_H-1:0] gu_idx;
  quad_t q;
  grouping_unit dut (.*);

  tri_idx_t midx [2][TILE_H][TILE_W];
  zbuf_t    mz   [2][TILE_H][TILE_W];
  always @(posedge clk)
    for (int y = 0; y < TILE_H; y++) begin
      gu_idx[y] <= midx[gu_bank][y][gu_addr];
      gu_z[y]   <= mz[gu_bank][y][gu_addr];
    end

  always @(posedge clk) q_ready <= ($urandom_range(3) != 0);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [TILE_H][TILE_W];
  tri_idx_t run_done [$];
  tri_idx_t last_idx;
  int nq, releases = 0, shared = 0;
  always @(posedge clk) if (tile_release) releases <= releases + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int ntri, b;
      int expect_pix;
      b = t % 2;
      ntri = (t == 0) ? 1 : 1 + int'($urandom_range(7));
      expect_pix = 0;
      // patches: each pixel takes the triangle of the last rectangle over it
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++) begin
          midx[b][y][x] = (t == 0) ? tri_idx_t'(5) : NO_TRI;
          mz[b][y][x]   = zbuf_t'($urandom);
        end
      if (t == 11) ntri = 0;   // empty tile
      for (int i = 0; i < ntri && t != 0; i++) begin
        int x0, y0, w, h;
        x0 = int'($urandom_range(TILE_W - 1)); y0 = int'($urandom_range(TILE_H - 1));
        w = 1 + int'($urandom_range(20)); h = 1 + int'($urandom_range(10));
        for (int y = y0; y < y0 + h && y < TILE_H; y++)
          for (int x = x0; x < x0 + w && x < TILE_W; x++) midx[b][y][x] = tri_idx_t'(t * 10 + i);
      end
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++) begin
          seen[y][x] = 0;
          if (midx[b][y][x] != NO_TRI) expect_pix++;
        end
      run_done.delete();
      nq = 0;
      @(negedge clk);
      tile_valid = 1; tile_bank = b[0]; tile_x = coord_t'(t * 32); tile_y = 16;
      @(posedge clk iff tile_release);
      @(negedge clk) tile_valid = 0;
      // collect blocks until the tile is finished
      forever begin
        @(posedge clk);
        if (tile_finished) break;
        if (q_valid && q_ready) begin
          if (nq > 0 && q.idx != last_idx) begin
            foreach (run_done[i]) if (run_done[i] == q.idx) begin
              failures++; $display("triangle %0d appears in two runs", q.idx);
            end
            run_done.push_back(last_idx);
          end
          last_idx = q.idx;
          nq++;
          checks++;
          if (q.mask == 0 || q.tile_x != coord_t'(t * 32)) failures++;
          if (q.mask != 4'hf) shared++;
          for (int k = 0; k < 4; k++) begin
            int px, py;
            px = 2 * int'(q.qx) + k % 2; py = 2 * int'(q.qy) + k / 2;
            if (q.mask[k]) begin
              seen[py][px]++;
              checks++;
              if (midx[b][py][px] != q.idx || mz[b][py][px] != q.z[k]) failures++;
            end else if (midx[b][py][px] == q.idx && seen[py][px] == 0) begin
              // a pixel of this triangle left out of its block
              failures++;
            end
          end
        end
      end
      checks++;
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++)
          if (seen[y][x] != ((midx[b][y][x] != NO_TRI) ? 1 : 0)) begin
            failures++; $display("tile %0d pixel %0d,%0d emitted %0d times", t, x, y, seen[y][x]);
          end
      if (t == 0 && nq != 128) begin failures++; $display("full tile gave %0d blocks", nq); end
    end
    checks += 2;
    if (releases != 12) begin failures++; $display("%0d bank releases", releases); end
    if (shared == 0) begin failures++; $display("no partly covered block seen"); end
    $display("blocks with a partial mask: %0d", shared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
