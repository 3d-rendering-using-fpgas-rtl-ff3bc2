// cube_max: the MAX unit, which prepares cube map texture coordinates.
//
// For a cube (environment) map the interpolated direction (s, t, r) selects
// one of six faces by its largest-magnitude component; the other two
// components, swapped and negated as the face requires, are then divided by
// that magnitude. This unit picks the major axis, arranges the two others
// and routes the divisor's input: in cube mode the divisor gets |major| and
// Compute U/V get the arranged pair, otherwise it passes RHW, s and t
// through unchanged, so the same divisor and multipliers serve both modes.
// Face numbers 0..5 are +X, -X, +Y, -Y, +Z, -Z; the swap/negate table is
// the usual OpenGL cube map convention and the tie order (x before y before
// z) is this design's choice; the published design only states the
// function. Magnitudes are compared on the IEEE bit patterns, which order
// like the values. Timing: one register stage.
module cube_max
  import r3d_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       cube,
  input  f32_t       s,
  input  f32_t       t,
  input  f32_t       r,
  input  f32_t       rhw,
  output logic       out_valid,
  output f32_t       div_in,    // to the divisor
  output f32_t       sc,        // to Compute U
  output f32_t       tc,        // to Compute V
  output logic [2:0] face
);
  function automatic f32_t neg(f32_t f);
    return {~f[31], f[30:0]};
  endfunction

  logic [30:0] ms, mt, mr;
  assign ms = s[30:0];
  assign mt = t[30:0];
  assign mr = r[30:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      div_in    <= '0;
      sc        <= '0;
      tc        <= '0;
      face      <= '0;
    end else begin
      out_valid <= in_valid;
      if (!cube) begin
        div_in <= rhw;
        sc     <= s;
        tc     <= t;
        face   <= 3'd0;
      end else if (ms >= mt && ms >= mr) begin          // X major
        div_in <= {1'b0, ms};
        sc     <= s[31] ? r : neg(r);
        tc     <= neg(t);
        face   <= s[31] ? 3'd1 : 3'd0;
      end else if (mt >= mr) begin                      // Y major
        div_in <= {1'b0, mt};
        sc     <= s;
        tc     <= t[31] ? neg(r) : r;
        face   <= t[31] ? 3'd3 : 3'd2;
      end else begin                                    // Z major
        div_in <= {1'b0, mr};
        sc     <= r[31] ? neg(s) : s;
        tc     <= neg(t);
        face   <= r[31] ? 3'd5 : 3'd4;
      end
    end
  end
endmodule
