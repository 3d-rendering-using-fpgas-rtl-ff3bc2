// grouping_unit: orders a finished tile's pixels by triangle, in 2x2 blocks.
//
// The shading pipeline reads a triangle's data from external memory, so it
// pays off to shade all pixels of one triangle together; and texture level
// selection works on 2x2 pixel blocks, so pixels travel in blocks of four.
// The unit first copies the tile's visible-triangle index and Z from the
// HSR line buffers (one column of all 16 lines per clock, 32 clocks) and
// then releases the HSR bank. It then makes passes over the 128 blocks of
// the tile: a pass emits every block that holds at least one not yet emitted
// pixel of the current triangle, with a 4-bit mask of those pixels, and marks
// them done. While scanning it notes the first block holding a pixel of
// another triangle, which seeds the next pass (blocks before it are all
// done). A block shared by several triangles is therefore emitted once per
// triangle. Pixels no triangle covers are never emitted.
//
// Interface: tile_valid/tile_bank/tile_x/tile_y/tile_release as offered by
// hsr_unit; quads leave on q_valid/q_ready (q held while q_valid && !q_ready);
// tile_finished pulses after the last quad of a tile. gu_bank/gu_addr read
// the HSR line buffers; gu_bank is simply tile_bank passed back, since the
// unit only reads the bank of the tile it is offered. Timing: 33 clocks to
// copy, then one block per clock in each pass.
// The purpose (grouping by triangle, 2x2 blocks) follows the published
// design; the copy-and-scan method is this design's choice.
module grouping_unit
  import r3d_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // finished tile from the HSR
  input  logic                          tile_valid,
  input  logic                          tile_bank,
  input  coord_t                        tile_x,
  input  coord_t                        tile_y,
  output logic                          tile_release,
  output logic                          gu_bank,
  output logic [$clog2(TILE_W)-1:0]     gu_addr,
  input  zbuf_t    [TILE_H-1:0]         gu_z,
  input  tri_idx_t [TILE_H-1:0]         gu_idx,
  // grouped 2x2 blocks
  output logic                          q_valid,
  input  logic                          q_ready,
  output quad_t                         q,
  output logic                          tile_finished
);
  localparam int AW  = $clog2(TILE_W);
  localparam int QW  = TILE_W / 2;
  localparam int QH  = TILE_H / 2;
  localparam int NQ  = QW * QH;
  localparam int QAW = $clog2(NQ);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SEED, S_PASS, S_FIN} state_t;
  state_t state;

  tri_idx_t tidx [TILE_H][TILE_W];
  zbuf_t    tz   [TILE_H][TILE_W];
  logic     done [TILE_H][TILE_W];

  logic [AW:0]   col;        // load column counter
  logic [QAW:0]  qa;         // block being scanned
  tri_idx_t      cur;        // triangle of this pass
  logic          nxt_found;
  logic [QAW:0]  nxt_qa;
  tri_idx_t      nxt_idx;
  coord_t        org_x, org_y;

  // the block under the scan pointer
  logic [3:0] bx;
  logic [2:0] by;
  logic [3:0] m_cur, m_other;
  tri_idx_t   other_idx;
  assign bx = qa[3:0];
  assign by = qa[6:4];

  always_comb begin
    m_cur     = '0;
    m_other   = '0;
    other_idx = cur;
    for (int k = 3; k >= 0; k--) begin
      int px, py;
      px = 2 * int'(bx) + (k % 2);
      py = 2 * int'(by) + (k / 2);
      if (!done[py][px]) begin
        if (tidx[py][px] == cur) m_cur[k] = 1'b1;
        else begin
          m_other[k] = 1'b1;
          other_idx  = tidx[py][px];
        end
      end
    end
  end

  logic emit_wait;
  assign emit_wait = q_valid && !q_ready;

  assign gu_bank = tile_bank;
  assign gu_addr = col[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      col           <= '0;
      qa            <= '0;
      cur           <= '0;
      nxt_found     <= 1'b0;
      nxt_qa        <= '0;
      nxt_idx       <= '0;
      org_x         <= '0;
      org_y         <= '0;
      q_valid       <= 1'b0;
      q             <= '0;
      tile_release  <= 1'b0;
      tile_finished <= 1'b0;
      for (int y = 0; y < TILE_H; y++)
        for (int x = 0; x < TILE_W; x++) done[y][x] <= 1'b1;
    end else begin
      tile_release  <= 1'b0;
      tile_finished <= 1'b0;
      if (q_valid && q_ready) q_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (tile_valid && !tile_release) begin
          state <= S_LOAD;
          col   <= '0;
          org_x <= tile_x;
          org_y <= tile_y;
        end
        S_LOAD: begin
          // column col-1 arrives while column col is addressed
          if (col != '0)
            for (int y = 0; y < TILE_H; y++) begin
              tidx[y][col-1] <= gu_idx[y];
              tz[y][col-1]   <= gu_z[y];
              done[y][col-1] <= (gu_idx[y] == NO_TRI);
            end
          if (col == (AW+1)'(TILE_W)) begin
            tile_release <= 1'b1;
            state        <= S_SEED;
            qa           <= '0;
          end else col <= col + 1'b1;
        end
        S_SEED: begin
          // find the first block with a pixel left
          if (qa == (QAW+1)'(NQ)) begin
            state <= S_FIN;
          end else if (m_cur != '0 || m_other != '0) begin
            cur       <= (m_cur != '0) ? cur : other_idx;
            state     <= S_PASS;
            nxt_found <= 1'b0;
          end else qa <= qa + 1'b1;
        end
        S_PASS: if (!emit_wait) begin
          if (qa == (QAW+1)'(NQ)) begin
            if (nxt_found) begin
              cur       <= nxt_idx;
              qa        <= nxt_qa;
              nxt_found <= 1'b0;
            end else state <= S_FIN;
          end else begin
            if (m_cur != '0) begin
              q_valid <= 1'b1;
              q.idx    <= cur;
              q.tile_x <= org_x;
              q.tile_y <= org_y;
              q.qx     <= bx;
              q.qy     <= by;
              q.mask   <= m_cur;
              for (int k = 0; k < 4; k++)
                q.z[k] <= tz[2*int'(by) + k/2][2*int'(bx) + k%2];
              for (int k = 0; k < 4; k++)
                if (m_cur[k]) done[2*int'(by) + k/2][2*int'(bx) + k%2] <= 1'b1;
            end
            if (!nxt_found && m_other != '0) begin
              nxt_found <= 1'b1;
              nxt_qa    <= qa;
              nxt_idx   <= other_idx;
            end
            qa <= qa + 1'b1;
          end
        end
        S_FIN: if (!q_valid) begin
          tile_finished <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a block is only emitted with pixels of its own triangle
  a_mask: assert property (@(posedge clk) disable iff (!rst_n) q_valid |-> q.mask != 4'b0);
endmodule
