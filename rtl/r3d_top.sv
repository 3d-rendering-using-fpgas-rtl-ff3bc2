// r3d_top: tile-based renderer core, from transformed triangles to the input
// of the pixel shader.
//
// The screen is drawn one 32x16 tile at a time. The host streams each tile's
// triangles; the hidden surface removal unit (hsr_unit) finds the nearest
// triangle and its Z for every pixel of the tile in on-chip memories, so no
// work is spent on hidden pixels and no external Z buffer is needed. The
// grouping unit then hands out the tile's pixels in 2x2 blocks ordered by
// triangle. For each block the feeder below gets the triangle's shading
// planes (plane equations of s, t, r, RHW and the colours) and issues the
// four pixels one per clock. The planes come from, in order of preference:
// the current-triangle register (consecutive blocks of one triangle), the
// plane cache (CACHE_N entries, direct mapped on the triangle index, one
// clock read), or, on a miss, the attribute setup unit: the triangle's vertex
// data is read from vertex memory and its 12 attributes are issued to
// attr_setup one per clock; 29 clocks after the last one the planes are
// complete, written into the cache and used. The shading front end interpolates the attributes,
// the MAX unit picks the cube map face (cube mode) or passes RHW through,
// the divisor forms the reciprocal, and Compute U/V multiply to give
// perspective-correct texture coordinates in Q16.16. Each pixel leaves with
// its triangle, position, Z, colours and a covered flag (the shader works
// on whole 2x2 blocks, so uncovered block members are delivered too).
//
// External parts are reached through ports: the triangle stream (tri_*),
// the vertex data memory holding each triangle's vertex positions and
// attribute values (attr_*, one clock read latency) and the pixel shader input (pix_*, no back-pressure).
// Pixel latency from the feeder: 25 clocks (13 interpolation, 1 MAX, 8
// divisor, 3 Compute U/V).
// The chain of units, the hardware plane setup and the on-chip plane cache
// follow the published design; the feeder, the cache organisation and size,
// and the port protocols are this design's choice.
module r3d_top
  import r3d_pkg::*;
#(
  parameter int unsigned CACHE_N = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  // triangles of the current tile
  input  logic      tri_valid,
  output logic      tri_ready,
  input  tri_in_t   tri_i,
  // vertex data memory: vertex positions and attribute values of a triangle
  output logic      attr_rd_en,
  output tri_idx_t  attr_rd_idx,
  input  tri_vtx_t  attr_rd_data,
  // to the pixel shader
  output logic      pix_valid,
  output pix_out_t  pix,
  // status
  output logic      tile_finished,
  output logic      hsr_idle
);
  localparam int AW = $clog2(TILE_W);

  // ---------------- hidden surface removal
  logic                    tile_done, tile_valid, tile_bank, tile_release, gu_bank;
  coord_t                  tile_x, tile_y;
  logic [AW-1:0]           gu_addr;
  zbuf_t    [TILE_H-1:0]   gu_z;
  tri_idx_t [TILE_H-1:0]   gu_idx;

  hsr_unit u_hsr (
    .clk, .rst_n, .tri_valid, .tri_ready, .tri_i,
    .tile_done, .tile_valid, .tile_bank, .tile_x, .tile_y, .tile_release,
    .gu_bank, .gu_addr, .gu_z, .gu_idx, .idle(hsr_idle)
  );

  // ---------------- grouping unit
  logic  q_valid, q_ready;
  quad_t q;

  grouping_unit u_gu (
    .clk, .rst_n, .tile_valid, .tile_bank, .tile_x, .tile_y, .tile_release,
    .gu_bank, .gu_addr, .gu_z, .gu_idx, .q_valid, .q_ready, .q, .tile_finished
  );

  // ---------------- feeder: plane lookup / setup, 2x2 block to pixels
  localparam int CW = $clog2(CACHE_N);
  typedef enum logic [2:0] {F_IDLE, F_CRD, F_FETCH, F_SETUP, F_COLLECT, F_PIX} fstate_t;
  fstate_t   fst;
  logic [1:0] k;
  tri_attr_t attr;          // planes of the current triangle
  tri_idx_t  attr_idx;
  logic      attr_ok;

  // plane cache
  tri_attr_t cmem [CACHE_N];
  tri_idx_t  ctag [CACHE_N];
  logic [CACHE_N-1:0] cval;
  tri_attr_t cmem_q;
  logic [CW-1:0] slot;
  logic      hit, c_we;
  assign slot = q.idx[CW-1:0];
  assign hit  = cval[slot] && ctag[slot] == q.idx;

  // attribute setup
  tri_vtx_t  vtx;
  tri_attr_t nattr;
  logic [3:0] sj, rj;       // attributes issued / collected
  logic      s_v, s_ov;
  f32_t [2:0] s_p;
  plane_t    s_plane;
  assign s_v = fst == F_SETUP;
  assign s_p = vtx.p[sj];

  attr_setup u_setup (
    .clk, .rst_n, .in_valid(s_v),
    .x0(vtx.x[0]), .y0(vtx.y[0]), .x1(vtx.x[1]), .y1(vtx.y[1]), .x2(vtx.x[2]), .y2(vtx.y[2]),
    .p0(s_p[0]), .p1(s_p[1]), .p2(s_p[2]),
    .out_valid(s_ov), .plane(s_plane)
  );

  // issued pixel
  logic      iv;
  coord_t    ix, iy;
  plane_t [2:0] itex;

  typedef struct packed {
    tri_idx_t idx;
    coord_t   x, y;
    zbuf_t    z;
    logic     covered;
    logic     cube;
    logic     quad_last;
  } side_t;
  side_t side_i;

  assign q_ready     = (fst == F_PIX) && (k == 2'd3);
  assign attr_rd_en  = (fst == F_IDLE) && q_valid && !(attr_ok && attr_idx == q.idx) && !hit;
  assign attr_rd_idx = q.idx;
  assign c_we        = (fst == F_COLLECT) && s_ov && rj == 4'(N_ATTR - 1);

  // completed planes: the last attribute is a colour, the rest are collected
  tri_attr_t wattr;
  always_comb begin
    wattr = nattr;
    wattr.col[N_COLOR-1] = s_plane;
  end

  always_ff @(posedge clk) begin
    cmem_q <= cmem[slot];
    if (c_we) begin
      cmem[slot] <= wattr;
      ctag[slot] <= q.idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst      <= F_IDLE;
      k        <= '0;
      attr     <= '0;
      attr_idx <= '0;
      attr_ok  <= 1'b0;
      cval     <= '0;
      vtx      <= '0;
      nattr    <= '0;
      sj       <= '0;
      rj       <= '0;
      iv       <= 1'b0;
      ix       <= '0;
      iy       <= '0;
      side_i   <= '0;
    end else begin
      iv <= 1'b0;
      unique case (fst)
        F_IDLE: if (q_valid) begin
          k <= '0;
          if (attr_ok && attr_idx == q.idx) fst <= F_PIX;
          else if (hit)                     fst <= F_CRD;
          else                              fst <= F_FETCH;
        end
        F_CRD: begin
          attr     <= cmem_q;
          attr_idx <= q.idx;
          attr_ok  <= 1'b1;
          fst      <= F_PIX;
        end
        F_FETCH: begin
          vtx        <= attr_rd_data;
          nattr.cube <= attr_rd_data.cube;
          sj         <= '0;
          rj         <= '0;
          fst        <= F_SETUP;
        end
        F_SETUP: begin
          sj <= sj + 4'd1;
          if (sj == 4'(N_ATTR - 1)) fst <= F_COLLECT;
        end
        F_COLLECT: if (s_ov) begin
          rj <= rj + 4'd1;
          case (rj)
            4'd0:    nattr.s   <= s_plane;
            4'd1:    nattr.t   <= s_plane;
            4'd2:    nattr.r   <= s_plane;
            4'd3:    nattr.rhw <= s_plane;
            default: nattr.col[rj - 4'd4] <= s_plane;
          endcase
          if (rj == 4'(N_ATTR - 1)) begin
            cval[slot] <= 1'b1;
            attr       <= wattr;
            attr_idx   <= q.idx;
            attr_ok    <= 1'b1;
            fst        <= F_PIX;
          end
        end
        F_PIX: begin
          iv               <= 1'b1;
          ix               <= q.tile_x + coord_t'({q.qx, k[0]});
          iy               <= q.tile_y + coord_t'({q.qy, k[1]});
          side_i.idx       <= q.idx;
          side_i.x         <= q.tile_x + coord_t'({q.qx, k[0]});
          side_i.y         <= q.tile_y + coord_t'({q.qy, k[1]});
          side_i.z         <= q.z[k];
          side_i.covered   <= q.mask[k];
          side_i.cube      <= attr.cube;
          side_i.quad_last <= (k == 2'd3);
          k                <= k + 2'd1;
          if (k == 2'd3) fst <= F_IDLE;
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  assign itex = {attr.r, attr.t, attr.s};

  // ---------------- interpolation (13 clocks)
  f32_t [2:0]         tex;
  f32_t [0:0]         rhw;
  f32_t [N_COLOR-1:0] col;
  logic               tex_v, rhw_v, col_v;
  plane_t [0:0]       prhw;
  assign prhw[0] = attr.rhw;

  interpolator #(.N(3)) u_tex (
    .clk, .rst_n, .in_valid(iv), .x(ix), .y(iy), .p(itex), .out_valid(tex_v), .v(tex));
  interpolator #(.N(1)) u_rhw (
    .clk, .rst_n, .in_valid(iv), .x(ix), .y(iy), .p(prhw), .out_valid(rhw_v), .v(rhw));
  interpolator #(.N(N_COLOR)) u_col (
    .clk, .rst_n, .in_valid(iv), .x(ix), .y(iy), .p(attr.col), .out_valid(col_v), .v(col));

  // side information in step with the interpolators
  side_t side_13;
  r3d_delay #(.W($bits(side_t)), .D(13)) u_d_side13 (.clk, .rst_n, .d(side_i), .q(side_13));

  // ---------------- MAX unit (1 clock)
  logic       mx_v;
  f32_t       div_in, sc, tc;
  logic [2:0] face;
  cube_max u_max (
    .clk, .rst_n, .in_valid(tex_v), .cube(side_13.cube),
    .s(tex[0]), .t(tex[1]), .r(tex[2]), .rhw(rhw[0]),
    .out_valid(mx_v), .div_in, .sc, .tc, .face);

  // ---------------- divisor (8 clocks)
  logic rc_v;
  f32_t rc;
  fp_recip u_div (.clk, .rst_n, .in_valid(mx_v), .a(div_in), .out_valid(rc_v), .y(rc));

  f32_t sc_d, tc_d;
  r3d_delay #(.W(32), .D(8)) u_d_sc (.clk, .rst_n, .d(sc), .q(sc_d));
  r3d_delay #(.W(32), .D(8)) u_d_tc (.clk, .rst_n, .d(tc), .q(tc_d));

  // ---------------- Compute U / Compute V (3 clocks)
  logic   u_v, v_v;
  fix16_t uu, vv;
  fp_mul_fix #(.OW(32), .FRAC(16)) u_cu (
    .clk, .rst_n, .in_valid(rc_v), .a(sc_d), .b(rc), .out_valid(u_v), .y(uu));
  fp_mul_fix #(.OW(32), .FRAC(16)) u_cv (
    .clk, .rst_n, .in_valid(rc_v), .a(tc_d), .b(rc), .out_valid(v_v), .y(vv));

  // ---------------- output assembly
  side_t              side_25;
  logic [2:0]         face_d;
  f32_t [N_COLOR-1:0] col_d;
  r3d_delay #(.W($bits(side_t)), .D(12)) u_d_side25 (.clk, .rst_n, .d(side_13), .q(side_25));
  r3d_delay #(.W(3), .D(11)) u_d_face (.clk, .rst_n, .d(face), .q(face_d));
  r3d_delay #(.W(32 * N_COLOR), .D(12)) u_d_col (.clk, .rst_n, .d(col), .q(col_d));

  assign pix_valid     = u_v;
  assign pix.idx       = side_25.idx;
  assign pix.x         = side_25.x;
  assign pix.y         = side_25.y;
  assign pix.z         = side_25.z;
  assign pix.covered   = side_25.covered;
  assign pix.cube      = side_25.cube;
  assign pix.face      = face_d;
  assign pix.u         = uu;
  assign pix.v         = vv;
  assign pix.col       = col_d;
  assign pix.quad_last = side_25.quad_last;

  // all branches of the pipeline stay in step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (tex_v == rhw_v) && (tex_v == col_v) && (u_v == v_v));
endmodule
