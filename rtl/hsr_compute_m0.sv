// hsr_compute_m0: edge intersections with the first line of a tile.
//
// For each of the three triangle edges it evaluates x = A*y + B on the tile's
// top pixel line, written as x = x_anchor + A*(y_tile - y_anchor) so that the
// host only supplies the slopes A0..A2 and the vertex data. Edge 0 (v0-v1) is
// anchored at v1, edge 1 (v0-v2) at v0 and edge 2 (v1-v2) at v2; with these
// anchors each intersection is exact on the line of its anchor vertex, which
// the cover test relies on. It also produces mode_y for that line.
// The formula follows the published design; the anchors and formats are this
// design's choice. Timing: one register stage, out_valid follows in_valid by
// one clock. Arithmetic is two's complement modulo 2^32, like the adders of
// the Z cells, so later incremental steps stay consistent with it.
module hsr_compute_m0
  import r3d_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  tri_in_t tri_i,
  output logic    out_valid,
  output fix16_t  m0, m1, m2,
  output mode_y_t mode
);
  function automatic fix16_t edge_x(coord_t xa, coord_t ya, coord_t yt, fix16_t a);
    logic signed [COORD_W:0] dy;
    logic signed [63:0]      p;
    dy = {yt[COORD_W-1], yt} - {ya[COORD_W-1], ya};
    p  = 64'(a) * 64'(dy);
    return fix16_t'((32'(xa) <<< XFRAC) + p[31:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      m0 <= '0; m1 <= '0; m2 <= '0;
      mode <= MODE_OUT;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        m0   <= edge_x(tri_i.x1, tri_i.y1, tri_i.tile_y, tri_i.a0);
        m1   <= edge_x(tri_i.x0, tri_i.y0, tri_i.tile_y, tri_i.a1);
        m2   <= edge_x(tri_i.x2, tri_i.y2, tri_i.tile_y, tri_i.a2);
        mode <= mode_y_f(tri_i.tile_y, tri_i.y0, tri_i.y1, tri_i.y2);
      end
    end
  end
endmodule
