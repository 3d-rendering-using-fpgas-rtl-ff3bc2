// Testbench for hsr_zcell: an even (rightward) and an odd (leftward) cell
// each process sequences of random triangles on one tile line. A memory model
// stands in for the line buffer. Checked: the Z buffer and index contents
// after each triangle against a per-pixel reference, the record handed to the
// next line, and that each line takes 34 clocks (last write 33 clocks after
// the step starts).
module tb_hsr_zcell;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0;
  int cyc = 0, start_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  cell_rec_t rin [2], rout [2];
  logic      rd_en [2], rd_bank [2], wr_en [2], wr_bank [2];
  logic [4:0] rd_addr [2], wr_addr [2];
  zbuf_t     rd_z [2], wr_z [2];
  tri_idx_t  wr_idx [2];
  zbuf_t     mz [2][2][32];
  tri_idx_t  mi [2][2][32];
  int        last_wr [2];

  for (genvar c = 0; c < 2; c++) begin : g
    hsr_zcell #(.ODD(c == 1)) dut (
      .clk, .rst_n, .start, .rec_in(rin[c]), .rec_out(rout[c]),
      .rd_en(rd_en[c]), .rd_bank(rd_bank[c]), .rd_addr(rd_addr[c]), .rd_z(rd_z[c]),
      .wr_en(wr_en[c]), .wr_bank(wr_bank[c]), .wr_addr(wr_addr[c]),
      .wr_z(wr_z[c]), .wr_idx(wr_idx[c])
    );
    always @(posedge clk) begin
      if (rd_en[c]) rd_z[c] <= mz[c][rd_bank[c]][rd_addr[c]];
      if (wr_en[c]) begin
        mz[c][wr_bank[c]][wr_addr[c]] <= wr_z[c];
        mi[c][wr_bank[c]][wr_addr[c]] <= wr_idx[c];
        last_wr[c] <= cyc - start_cyc;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cell_rec_t make_rec(tri_in_t t, int y, bit odd, bit first, bit bank);
    cell_rec_t r;
    r = '0;
    r.valid = 1; r.first = first; r.bank = bank; r.empty = t.empty;
    r.idx = t.idx; r.tile_x = t.tile_x; r.y = coord_t'(y);
    r.yv0 = t.y0; r.yv1 = t.y1; r.yv2 = t.y2;
    r.m0 = ref_edge(t.x1, t.y1, t.a0, y);
    r.m1 = ref_edge(t.x0, t.y0, t.a1, y);
    r.m2 = ref_edge(t.x2, t.y2, t.a2, y);
    r.a0 = t.a0; r.a1 = t.a1; r.a2 = t.a2;
    r.e = t.e; r.f = t.f;
    r.z = ref_z(t, int'(t.tile_x) + (odd ? TILE_W - 1 : 0), y);
    r.mode = ref_mode(y, t);
    return r;
  endfunction

  int hits = 0;
  initial begin
    zbuf_t    rz [2][32];
    tri_idx_t ri [2][32];
    rin[0] = '0; rin[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      int tx, ty, ln [2];
      bit bank;
      tx = 32 * int'($urandom_range(8));
      ty = 16 * int'($urandom_range(10));
      bank = s[0];
      ln[0] = ty + int'($urandom_range(15));
      ln[1] = ty + int'($urandom_range(15));
      for (int n = 0; n < 8; n++) begin
        tri_in_t t;
        t = rand_tri(tx, ty, s * 8 + n, 8);
        if (s == 3 && n == 0) t.empty = 1;
        for (int c = 0; c < 2; c++) begin
          rin[c] = make_rec(t, ln[c], c == 1, n == 0, bank);
          // reference
          for (int x = 0; x < TILE_W; x++) begin
            zval_t z;
            bit cov;
            cov = ref_cover(t, tx + x, ln[c]);
            z = ref_z(t, tx + x, ln[c]);
            if (n == 0) begin rz[c][x] = Z_FAR; ri[c][x] = NO_TRI; end
            if (cov && (n == 0 || longint'(z) < longint'({1'b0, rz[c][x]}))) begin
              rz[c][x] = z[ZBUF_W-1:0]; ri[c][x] = t.idx; hits++;
            end
          end
        end
        @(negedge clk); start = 1; start_cyc = cyc + 1;
        @(negedge clk); start = 0;
        repeat (34) @(negedge clk);
        for (int c = 0; c < 2; c++) begin
          bit bad;
          bad = 0;
          for (int x = 0; x < TILE_W; x++)
            if (mz[c][bank][x] !== rz[c][x] || mi[c][bank][x] !== ri[c][x]) bad = 1;
          checks++; if (bad) begin failures++; if (failures < 5) $display("line mismatch s%0d n%0d cell%0d", s, n, c); end
          checks++;
          if (!rout[c].valid || rout[c].y !== coord_t'(ln[c] + 1) ||
              rout[c].m0 !== ref_edge(t.x1, t.y1, t.a0, ln[c] + 1) ||
              rout[c].m1 !== ref_edge(t.x0, t.y0, t.a1, ln[c] + 1) ||
              rout[c].m2 !== ref_edge(t.x2, t.y2, t.a2, ln[c] + 1) ||
              rout[c].mode !== ref_mode(ln[c] + 1, t) ||
              rout[c].z !== ref_z(t, int'(t.tile_x) + ((c == 1) ? 0 : TILE_W - 1), ln[c] + 1)) begin
            failures++; if (failures < 5) $display("record mismatch s%0d n%0d cell%0d", s, n, c);
          end
          if (n == 0) begin
            checks++;
            if (last_wr[c] != TILE_W + 1) begin
              failures++; $display("line took %0d clocks to last write", last_wr[c] + 1);
            end
          end
        end
      end
    end
    checks++;
    if (hits < 50) begin failures++; $display("too few visible pixels: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
