// attr_setup: computes the plane equation p = a*x + b*y + c of one shading
// attribute (a texture coordinate, RHW or a colour channel) from its values
// p0, p1, p2 at the three screen-space vertices, in single precision.
//
// How it works: with dxk = xk - x0, dyk = yk - y0 and
// det = dx1*dy2 - dx2*dy1 (exact, in integers),
//   a = ((p1-p0)*dy2 - (p2-p0)*dy1) / det
//   b = ((p2-p0)*dx1 - (p1-p0)*dx2) / det
//   c = p0 - (a*x0 + b*y0)
// The datapath is fully pipelined and built from the shading units:
//   clk  0..3   det converted to float (fp_mul_int by 1.0)  | p1-p0, p2-p0 (fp_add)
//   clk  3..11  1/det (fp_recip)                             | products with dx, dy (fp_mul_int)
//   clk  8..13                                                 numerators (fp_add)
//   clk 13..16  a, b = numerator * 1/det (fp_mul)
//   clk 16..19  a*x0, b*y0 (fp_mul_int); 19..24 their sum; 24..29 c (fp_add)
// Side values travel in r3d_delay lines.
//
// Interface and timing: one triangle attribute per clock on in_valid; out_valid
// and plane follow 29 clocks later. A zero-area triangle (det = 0) gets the
// constant plane a = b = 0, c = p0, since it can still own its vertex pixels.
// Precision is that of the float units (round to
// nearest, flush to zero).
//
// Source vs. choice: the document states that the shading plane coefficients
// are computed in hardware in floating point to save external memory reads.
// The formula, the operation order, the pipelining and the latency are this
// design's choices. The document's on-chip cache of computed planes is not
// part of this block; it sits in r3d_top, which fills it through this unit.
module attr_setup
  import r3d_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  coord_t x0, y0, x1, y1, x2, y2,
  input  f32_t   p0, p1, p2,
  output logic   out_valid,
  output plane_t plane
);
  localparam f32_t ONE = 32'h3f80_0000;

  function automatic f32_t neg(f32_t v);
    return {~v[31], v[30:0]};
  endfunction

  logic signed [16:0] dx1, dy1, dx2, dy2;
  logic signed [34:0] det;
  always_comb begin
    dx1 = 17'(x1) - 17'(x0);
    dy1 = 17'(y1) - 17'(y0);
    dx2 = 17'(x2) - 17'(x0);
    dy2 = 17'(y2) - 17'(y0);
    det = 35'(dx1) * 35'(dy2) - 35'(dx2) * 35'(dy1);
  end

  // reciprocal of det
  logic v_detf, v_r;
  f32_t detf, r, r_d;
  fp_mul_int #(.IW(35)) u_detf (.clk, .rst_n, .in_valid, .a(ONE), .n(det),
                                .out_valid(v_detf), .y(detf));
  fp_recip u_rcp (.clk, .rst_n, .in_valid(v_detf), .a(detf), .out_valid(v_r), .y(r));
  r3d_delay #(.W(32), .D(2)) u_rd (.clk, .rst_n, .d(r), .q(r_d));

  // attribute differences
  logic v_d;
  f32_t d1, d2;
  fp_add u_d1 (.clk, .rst_n, .in_valid, .a(p1), .b(neg(p0)), .out_valid(v_d), .y(d1));
  fp_add u_d2 (.clk, .rst_n, .in_valid, .a(p2), .b(neg(p0)), .out_valid(),    .y(d2));

  logic signed [16:0] dx1_d, dy1_d, dx2_d, dy2_d;
  r3d_delay #(.W(68), .D(5)) u_dd (.clk, .rst_n, .d({dx1, dy1, dx2, dy2}),
                                   .q({dx1_d, dy1_d, dx2_d, dy2_d}));

  // numerators
  logic v_t;
  f32_t ta1, ta2, tb1, tb2;
  fp_mul_int #(.IW(17)) u_ta1 (.clk, .rst_n, .in_valid(v_d), .a(d1), .n(dy2_d), .out_valid(v_t), .y(ta1));
  fp_mul_int #(.IW(17)) u_ta2 (.clk, .rst_n, .in_valid(v_d), .a(d2), .n(dy1_d), .out_valid(),    .y(ta2));
  fp_mul_int #(.IW(17)) u_tb1 (.clk, .rst_n, .in_valid(v_d), .a(d2), .n(dx1_d), .out_valid(),    .y(tb1));
  fp_mul_int #(.IW(17)) u_tb2 (.clk, .rst_n, .in_valid(v_d), .a(d1), .n(dx2_d), .out_valid(),    .y(tb2));

  logic v_n;
  f32_t an, bn;
  fp_add u_an (.clk, .rst_n, .in_valid(v_t), .a(ta1), .b(neg(ta2)), .out_valid(v_n), .y(an));
  fp_add u_bn (.clk, .rst_n, .in_valid(v_t), .a(tb1), .b(neg(tb2)), .out_valid(),    .y(bn));

  // gradients
  logic v_g;
  f32_t ga, gb;
  fp_mul u_ga (.clk, .rst_n, .in_valid(v_n), .a(an), .b(r_d), .out_valid(v_g), .y(ga));
  fp_mul u_gb (.clk, .rst_n, .in_valid(v_n), .a(bn), .b(r_d), .out_valid(),    .y(gb));

  // constant term
  coord_t x0_d, y0_d;
  r3d_delay #(.W(32), .D(16)) u_xy (.clk, .rst_n, .d({x0, y0}), .q({x0_d, y0_d}));

  logic v_o;
  f32_t ax0, by0;
  fp_mul_int #(.IW(16)) u_ax (.clk, .rst_n, .in_valid(v_g), .a(ga), .n(x0_d), .out_valid(v_o), .y(ax0));
  fp_mul_int #(.IW(16)) u_by (.clk, .rst_n, .in_valid(v_g), .a(gb), .n(y0_d), .out_valid(),    .y(by0));

  logic v_s;
  f32_t s;
  fp_add u_s (.clk, .rst_n, .in_valid(v_o), .a(ax0), .b(by0), .out_valid(v_s), .y(s));

  f32_t p0_d;
  r3d_delay #(.W(32), .D(24)) u_p0 (.clk, .rst_n, .d(p0), .q(p0_d));

  f32_t c;
  fp_add u_c (.clk, .rst_n, .in_valid(v_s), .a(p0_d), .b(neg(s)), .out_valid(out_valid), .y(c));

  f32_t ga_d, gb_d, p0_dd;
  r3d_delay #(.W(64), .D(13)) u_ab (.clk, .rst_n, .d({ga, gb}), .q({ga_d, gb_d}));
  r3d_delay #(.W(32), .D(5))  u_p0c (.clk, .rst_n, .d(p0_d), .q(p0_dd));

  // zero-area triangle: constant plane
  logic flat, flat_d;
  assign flat = det == 0;
  r3d_delay #(.W(1), .D(29)) u_flat (.clk, .rst_n, .d(flat), .q(flat_d));
  assign plane.a = flat_d ? 32'd0 : ga_d;
  assign plane.b = flat_d ? 32'd0 : gb_d;
  assign plane.c = flat_d ? p0_dd : c;

  // the two branches of the datapath meet at the gradient multipliers
  logic v_r_d;
  r3d_delay #(.W(1), .D(2)) u_vr (.clk, .rst_n, .d(v_r), .q(v_r_d));
  a_align: assert property (@(posedge clk) disable iff (!rst_n) v_n == v_r_d);
endmodule
