// hsr_line_buffer: on-chip Z buffer and triangle index (TR Num) buffer of one
// tile line.
//
// Both memories are double buffered: bank b holds the tile the Z cell is
// working on while the other bank holds the previous, finished tile for the
// grouping unit. The Z buffer is dual port: the Z cell reads the stored Z of
// one pixel and, two clocks later, writes the winning Z and index of an
// earlier pixel in the same clock. A third, read-only port lets the grouping
// unit read the finished bank (Z and index of one pixel).
// Timing: reads are synchronous, data appears one clock after the address.
// The double buffering and dual port follow the published design; the
// separate grouping-unit port is this design's choice.
module hsr_line_buffer
  import r3d_pkg::*;
#(
  parameter int unsigned DEPTH = TILE_W
) (
  input  logic                     clk,
  // Z cell: compare read
  input  logic                     rd_en,
  input  logic                     rd_bank,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output zbuf_t                    rd_z,
  // Z cell: write of the visible triangle
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  zbuf_t                    wr_z,
  input  tri_idx_t                 wr_idx,
  // grouping unit: read of a finished tile
  input  logic                     gu_bank,
  input  logic [$clog2(DEPTH)-1:0] gu_addr,
  output zbuf_t                    gu_z,
  output tri_idx_t                 gu_idx
);
  zbuf_t    zmem   [2*DEPTH];
  tri_idx_t idxmem [2*DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      zmem[{wr_bank, wr_addr}]   <= wr_z;
      idxmem[{wr_bank, wr_addr}] <= wr_idx;
    end
    if (rd_en) rd_z <= zmem[{rd_bank, rd_addr}];
    gu_z   <= zmem[{gu_bank, gu_addr}];
    gu_idx <= idxmem[{gu_bank, gu_addr}];
  end
endmodule
