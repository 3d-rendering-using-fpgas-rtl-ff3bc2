// hsr_compute_z0: Z value of a tile's first pixel.
//
// Evaluates the plane equation z = E*x + F*y + G (signed Q8.24, x and y
// integer screen coordinates) at the tile origin, the pixel where Z cell 0
// starts. The plane coefficients are computed by the host as in the published
// design; the origin and the formats are this design's choice. Products are
// kept modulo 2^32, the same as the incremental adders of the Z cells.
// Timing: one register stage, out_valid follows in_valid by one clock.
module hsr_compute_z0
  import r3d_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  coord_t x,
  input  coord_t y,
  input  zval_t  e,
  input  zval_t  f,
  input  zval_t  g,
  output logic   out_valid,
  output zval_t  z0
);
  logic signed [63:0] px, py;
  always_comb begin
    px = 64'(e) * 64'(x);
    py = 64'(f) * 64'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z0        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) z0 <= zval_t'(px[31:0] + py[31:0] + g);
    end
  end
endmodule
