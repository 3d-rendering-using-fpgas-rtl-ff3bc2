// interpolator: evaluates the plane equations of N attributes at a pixel.
//
// Every attribute (texture coordinate, RHW, colour channel) varies linearly
// in screen space once it has been multiplied by RHW, so its value at pixel
// (x, y) is v = a*x + b*y + c with single precision coefficients. Per
// attribute two mixed float/integer multipliers form a*x and b*y (three
// clocks), one adder sums them (five clocks) and a second adder adds c,
// which is delayed to meet the sum (five clocks). One pixel per clock
// enters; out_valid follows in_valid by 13 clocks. The structure
// (mixed multipliers, floating adders, their stage counts) follows the
// published design; N and the order of the additions are this design's
// choice. The same module serves as texture coordinate, RHW and colour
// interpolator.
module interpolator
  import r3d_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  coord_t             x,
  input  coord_t             y,
  input  plane_t [N-1:0]     p,
  output logic               out_valid,
  output f32_t   [N-1:0]     v
);
  localparam int LAT_MUL = 3;
  localparam int LAT_ADD = 5;

  logic [N-1:0] vm, va1, va2;

  for (genvar i = 0; i < N; i++) begin : g_ch
    f32_t ax, by, sxy;
    f32_t cd [LAT_MUL + LAT_ADD];
    logic vb;

    fp_mul_int #(.IW(COORD_W)) u_mx (
      .clk, .rst_n, .in_valid, .a(p[i].a), .n(x), .out_valid(vm[i]), .y(ax));
    fp_mul_int #(.IW(COORD_W)) u_my (
      .clk, .rst_n, .in_valid, .a(p[i].b), .n(y), .out_valid(vb), .y(by));
    fp_add u_a1 (
      .clk, .rst_n, .in_valid(vm[i]), .a(ax), .b(by), .out_valid(va1[i]), .y(sxy));
    fp_add u_a2 (
      .clk, .rst_n, .in_valid(va1[i]), .a(sxy), .b(cd[LAT_MUL + LAT_ADD - 1]),
      .out_valid(va2[i]), .y(v[i]));

    // c waits for a*x + b*y
    always_ff @(posedge clk) begin
      cd[0] <= p[i].c;
      for (int k = 1; k < LAT_MUL + LAT_ADD; k++) cd[k] <= cd[k-1];
    end
  end

  assign out_valid = va2[0];
endmodule
