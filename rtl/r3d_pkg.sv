// r3d_pkg: types and constants shared by the tile renderer.
//
// The renderer works on screen tiles of TILE_W x TILE_H pixels (32 x 16). The
// hidden surface removal (HSR) unit has one Z cell per tile line; each cell
// walks its line one pixel per clock and hands a triangle record to the next
// cell. Fixed-point formats used by the HSR:
//   * screen coordinates: signed integers, COORD_W bits
//   * edge intersections and edge slopes (x per line): signed Q16.16
//   * Z and the Z plane coefficients E, F, G: signed Q8.24 (24 fraction bits,
//     8 integer bits so that Z can be extrapolated outside the triangle)
//   * the Z buffer keeps the 24 fraction bits only
// The tile size, the 24+8 Z bits and the mode_y encoding follow the published
// design; the coordinate and slope formats, the index width and the record
// layouts are this design's choices.
package r3d_pkg;

  localparam int TILE_W   = 32;
  localparam int TILE_H   = 16;
  localparam int COORD_W  = 16;
  localparam int IDX_W    = 12;
  localparam int ZBUF_W   = 24;
  localparam int Z_W      = 32;
  localparam int XFRAC    = 16;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic signed [31:0]        fix16_t;   // Q16.16
  typedef logic signed [Z_W-1:0]     zval_t;    // Q8.24
  typedef logic [IDX_W-1:0]          tri_idx_t;
  typedef logic [ZBUF_W-1:0]         zbuf_t;

  // index stored for pixels that no triangle covers
  localparam tri_idx_t NO_TRI = '1;
  // Z buffer content of an empty pixel (farthest value)
  localparam zbuf_t    Z_FAR  = '1;

  // Which pair of edge intersections decides coverage on a pixel line.
  typedef enum logic [2:0] {
    MODE_OUT   = 3'd0,   // line outside the triangle
    MODE_UPPER = 3'd1,   // y0 < y <= y1 : edges 0 and 1
    MODE_LOWER = 3'd2,   // y1 < y <  y2 : edges 1 and 2
    MODE_TOP   = 3'd3,   // y == y0
    MODE_BOT   = 3'd4    // y == y2
  } mode_y_t;

  // Triangle as it enters the HSR unit (prepared by the host).
  // Vertices are sorted by growing y. Edge 0 joins v0-v1 and is anchored at
  // v1, edge 1 joins v0-v2 and is anchored at v0, edge 2 joins v1-v2 and is
  // anchored at v2; a horizontal edge has slope 0.
  typedef struct packed {
    tri_idx_t idx;
    logic     first;     // first triangle of a tile
    logic     last;      // last triangle of a tile
    logic     empty;     // placeholder that covers nothing (empty tile)
    coord_t   tile_x;    // tile origin, screen pixels
    coord_t   tile_y;
    coord_t   x0, y0, x1, y1, x2, y2;
    fix16_t   a0, a1, a2;   // edge slopes dx/dy
    zval_t    e, f, g;      // z = e*x + f*y + g
  } tri_in_t;

  // Record passed from one Z cell to the next (Figure 5 signals).
  typedef struct packed {
    logic     valid;
    logic     first;
    logic     last;
    logic     empty;
    logic     bank;      // which half of the double-buffered memories
    tri_idx_t idx;       // TR Num
    coord_t   tile_x;
    coord_t   y;         // pixel line this record is for
    coord_t   yv0, yv1, yv2;    // vertex y (yx)
    fix16_t   m0, m1, m2;       // edge intersections on line y (mx)
    fix16_t   a0, a1, a2;       // edge slopes (Ax)
    zval_t    e, f;
    zval_t    z;         // Z at the line's first visited pixel
    mode_y_t  mode;
  } cell_rec_t;

  // One 2x2 pixel block handed from the grouping unit to the shader.
  // mask bit k covers pixel (2*qx + k%2, 2*qy + k/2).
  typedef struct packed {
    tri_idx_t    idx;
    coord_t      tile_x;
    coord_t      tile_y;
    logic [3:0]  qx;
    logic [2:0]  qy;
    logic [3:0]  mask;
    zbuf_t [3:0] z;
  } quad_t;

  function automatic mode_y_t mode_y_f(coord_t y, coord_t yv0, coord_t yv1, coord_t yv2);
    if (y == yv0)                  return MODE_TOP;
    else if (y == yv2)             return MODE_BOT;
    else if (y > yv0 && y <= yv1)  return MODE_UPPER;
    else if (y > yv1 && y < yv2)   return MODE_LOWER;
    else                           return MODE_OUT;
  endfunction

  // ---------------------------------------------------------------------
  // Shading pipeline (IEEE single precision)
  localparam int N_COLOR = 8;   // diffuse RGBA and specular RGBA

  typedef logic [31:0] f32_t;

  // plane equation v = a*x + b*y + c
  typedef struct packed {
    f32_t a, b, c;
  } plane_t;

  // per-triangle shading data read from vertex memory
  typedef struct packed {
    logic                  cube;   // texture coordinates address a cube map
    plane_t                s, t, r, rhw;
    plane_t [N_COLOR-1:0]  col;
  } tri_attr_t;

  // per-triangle vertex data read from vertex memory for the attribute setup:
  // screen x, y of the three vertices and the value of every shading
  // attribute at each vertex, in the order s, t, r, RHW, colours 0..7
  localparam int N_ATTR = 4 + N_COLOR;
  typedef struct packed {
    logic                        cube;
    coord_t [2:0]                x, y;
    f32_t   [N_ATTR-1:0][2:0]    p;
  } tri_vtx_t;

  // pixel delivered to the pixel shader
  typedef struct packed {
    tri_idx_t            idx;
    coord_t              x, y;
    zbuf_t               z;
    logic                covered;
    logic                cube;
    logic [2:0]          face;
    fix16_t              u, v;
    f32_t [N_COLOR-1:0]  col;
    logic                quad_last;   // fourth pixel of a 2x2 block
  } pix_out_t;

endpackage
