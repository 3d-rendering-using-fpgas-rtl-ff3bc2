// hsr_unit: hidden surface removal for one tile at a time.
//
// Determines, for every pixel of a 32x16 tile, the nearest triangle and its
// Z. The host streams the triangles of a tile (tri_valid/tri_ready, the
// first and last triangle flagged). The front end computes the edge
// intersections and mode_y (hsr_compute_m0) and the Z (hsr_compute_z0) of the
// tile's top line and stages the record. A chain of TILE_H Z cells, one per
// line, advances in lock step: every step of 34 clocks each cell passes its
// record to the next cell and cell 0 takes the staged triangle, so up to
// TILE_H triangles are in flight and the throughput is one triangle per step.
// Even cells walk right and odd cells walk left.
//
// Every cell has a double-buffered line buffer. A tile is written into one
// bank while the grouping unit reads the previous tile from the other; the
// next tile starts as soon as its bank is free, without waiting for the
// previous tile to drain. tile_done pulses (for one clock) when the last
// triangle of a tile has left the last cell. Finished tiles are offered in
// order: tile_valid stays high while the oldest one waits (tile_bank, origin
// tile_x/tile_y); the bank stays with the reader until it pulses
// tile_release, and only then can a new tile be started in it.
// Structure and step length follow the published design; the handshakes,
// the bank ownership rule and the staging register are this design's choice.
module hsr_unit
  import r3d_pkg::*;
#(
  parameter int unsigned N_CELLS = TILE_H
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // triangles of the current tile
  input  logic                       tri_valid,
  output logic                       tri_ready,
  input  tri_in_t                    tri_i,
  // finished tiles, handed to the reader in order
  output logic                       tile_done,    // pulse: a tile left the chain
  output logic                       tile_valid,   // oldest finished tile waits
  output logic                       tile_bank,    // ... in this bank
  output coord_t                     tile_x,
  output coord_t                     tile_y,
  input  logic                       tile_release, // reader is done with it
  // reader (grouping unit) port
  input  logic                       gu_bank,
  input  logic [$clog2(TILE_W)-1:0]  gu_addr,
  output zbuf_t    [N_CELLS-1:0]     gu_z,
  output tri_idx_t [N_CELLS-1:0]     gu_idx,
  // status
  output logic                       idle
);
  localparam int STEP_CLKS = TILE_W + 2;
  localparam int AW = $clog2(TILE_W);

  // ---------------- step generator
  logic [5:0] step_cnt;
  logic       start;
  assign start = (step_cnt == '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              step_cnt <= '0;
    else if (step_cnt == 6'(STEP_CLKS - 1))  step_cnt <= '0;
    else                                     step_cnt <= step_cnt + 6'd1;
  end

  // ---------------- front end
  logic       wbank;       // bank the front end fills
  logic       rbank;       // bank of the oldest finished tile
  logic [1:0] bank_free;
  logic       inflight;
  tri_in_t    tri_q;
  cell_rec_t  stg;
  logic       m_valid, z_valid;
  fix16_t     m0, m1, m2;
  mode_y_t    mode0;
  zval_t      z0;
  logic       accept;

  assign tri_ready = !stg.valid && !inflight && (!tri_i.first || bank_free[wbank]);
  assign accept    = tri_valid && tri_ready;

  hsr_compute_m0 u_m0 (
    .clk, .rst_n, .in_valid(accept), .tri_i,
    .out_valid(m_valid), .m0, .m1, .m2, .mode(mode0)
  );

  hsr_compute_z0 u_z0 (
    .clk, .rst_n, .in_valid(accept), .x(tri_i.tile_x), .y(tri_i.tile_y),
    .e(tri_i.e), .f(tri_i.f), .g(tri_i.g), .out_valid(z_valid), .z0
  );

  cell_rec_t rec [N_CELLS+1];   // rec[k] feeds cell k, rec[N_CELLS] leaves

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      bank_free <= 2'b11;
      inflight  <= 1'b0;
      tri_q     <= '0;
      stg       <= '0;
    end else begin
      if (accept) begin
        tri_q    <= tri_i;
        inflight <= 1'b1;
        if (tri_i.first) bank_free[wbank] <= 1'b0;
        if (tri_i.last)  wbank <= ~wbank;
      end
      if (start) stg.valid <= 1'b0;
      if (m_valid && z_valid) begin
        inflight   <= 1'b0;
        stg.valid  <= 1'b1;
        stg.first  <= tri_q.first;
        stg.last   <= tri_q.last;
        stg.empty  <= tri_q.empty;
        stg.bank   <= tri_q.last ? ~wbank : wbank;
        stg.idx    <= tri_q.idx;
        stg.tile_x <= tri_q.tile_x;
        stg.y      <= tri_q.tile_y;
        stg.yv0    <= tri_q.y0;
        stg.yv1    <= tri_q.y1;
        stg.yv2    <= tri_q.y2;
        stg.m0     <= m0;
        stg.m1     <= m1;
        stg.m2     <= m2;
        stg.a0     <= tri_q.a0;
        stg.a1     <= tri_q.a1;
        stg.a2     <= tri_q.a2;
        stg.e      <= tri_q.e;
        stg.f      <= tri_q.f;
        stg.z      <= z0;
        stg.mode   <= mode0;
      end
      if (tile_release) bank_free[rbank] <= 1'b1;
    end
  end

  assign rec[0] = stg;

  // ---------------- cell chain
  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    logic          rd_en, rd_bank, wr_en, wr_bank;
    logic [AW-1:0] rd_addr, wr_addr;
    zbuf_t         rd_z, wr_z;
    tri_idx_t      wr_idx;

    hsr_zcell #(.ODD(k % 2 == 1)) u_cell (
      .clk, .rst_n, .start, .rec_in(rec[k]), .rec_out(rec[k+1]),
      .rd_en, .rd_bank, .rd_addr, .rd_z,
      .wr_en, .wr_bank, .wr_addr, .wr_z, .wr_idx
    );

    hsr_line_buffer #(.DEPTH(TILE_W)) u_buf (
      .clk, .rd_en, .rd_bank, .rd_addr, .rd_z,
      .wr_en, .wr_bank, .wr_addr, .wr_z, .wr_idx,
      .gu_bank, .gu_addr, .gu_z(gu_z[k]), .gu_idx(gu_idx[k])
    );
  end

  // ---------------- tile completion
  // Tiles finish in the order they started, alternating banks; rbank is the
  // bank of the oldest finished tile not yet released.
  logic [1:0] ready;
  coord_t     org_x [2], org_y [2];
  logic       fin;
  cell_rec_t  out_rec;
  assign out_rec = rec[N_CELLS];
  assign fin     = start && out_rec.valid && out_rec.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tile_done <= 1'b0;
      rbank     <= 1'b0;
      ready     <= 2'b00;
      org_x     <= '{default: '0};
      org_y     <= '{default: '0};
    end else begin
      tile_done <= fin;
      if (fin) begin
        ready[out_rec.bank] <= 1'b1;
        org_x[out_rec.bank] <= out_rec.tile_x;
        org_y[out_rec.bank] <= out_rec.y - coord_t'(N_CELLS);
      end
      if (tile_release) begin
        ready[rbank] <= 1'b0;
        rbank        <= ~rbank;
      end
    end
  end

  assign tile_valid = ready[rbank];
  assign tile_bank  = rbank;
  assign tile_x     = org_x[rbank];
  assign tile_y     = org_y[rbank];

  // nothing staged, computing, or held between cells
  logic busy_cells;
  always_comb begin
    busy_cells = 1'b0;
    for (int k = 0; k <= N_CELLS; k++) busy_cells |= rec[k].valid;
  end
  assign idle = !inflight && !busy_cells;

  // a first triangle is only accepted into a bank nobody else owns
  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
                   accept && tri_i.first |-> bank_free[wbank]);
  // the reader only returns a bank it owns
  a_release: assert property (@(posedge clk) disable iff (!rst_n)
                   tile_release |-> tile_valid);
endmodule
