// hsr_zcell: one Z cell of the hidden surface removal unit.
//
// A cell owns one line of the tile. Each step it takes a triangle record from
// the previous cell (or from the HSR front end) and visits the 32 pixels of
// its line, one per clock: cells with ODD=0 walk left to right adding E to Z,
// cells with ODD=1 walk right to left subtracting E, so that the Z handed on
// (last Z plus F) is already the Z of the next line's first pixel. For each
// pixel a three-clock pipeline reads the stored Z (clock 0), runs the cover
// test and the Z compare (clock 1) and writes Z and triangle index of a
// visible pixel (clock 2); the line therefore takes 34 clocks. In parallel the
// cell prepares the record of the next line: edge intersections plus slopes
// and mode_y of line y+1.
//
// Cover test (top-left rule): mode 1 uses edges 0 and 1, mode 2 edges 1 and
// 2, a pixel at x is covered when left <= x < right. On the line of v0 only
// v0 is covered, or the whole top edge (both ends included) when the top edge
// is horizontal; on the line of v2 only v2 is covered.
// The first triangle of a tile writes every pixel (Z_FAR / NO_TRI where it
// does not cover), which clears the bank without a separate pass.
//
// Interface: `start` is a one-clock pulse common to all cells, once per step
// of 34 clocks; rec_in is sampled with it; rec_out is updated one clock
// before the next step (the last write happens in the step's final clock,
// the same clock the next record is taken in), so a record moves one cell
// per step. The stepping, cover rule and the
// 34-clock line follow the published design; the record layout, the clear on
// the first triangle and the anchors of the edges are this design's choice.
module hsr_zcell
  import r3d_pkg::*;
#(
  parameter bit ODD = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  cell_rec_t                 rec_in,
  output cell_rec_t                 rec_out,
  // line buffer ports
  output logic                      rd_en,
  output logic                      rd_bank,
  output logic [$clog2(TILE_W)-1:0] rd_addr,
  input  zbuf_t                     rd_z,
  output logic                      wr_en,
  output logic                      wr_bank,
  output logic [$clog2(TILE_W)-1:0] wr_addr,
  output zbuf_t                     wr_z,
  output tri_idx_t                  wr_idx
);
  localparam int AW = $clog2(TILE_W);
  localparam int STEP_CLKS = TILE_W + 2;

  cell_rec_t        cur;
  logic [5:0]       phase;
  zval_t            zr;          // Z of the pixel being read
  // pipeline stage 1 (compare)
  logic             s1_v;
  logic [AW-1:0]    s1_addr;
  zval_t            s1_z;
  logic             s1_cov;
  // pipeline stage 2 (write)
  logic             s2_v;
  logic [AW-1:0]    s2_addr;
  zbuf_t            s2_z;
  tri_idx_t         s2_idx;

  logic [AW-1:0]    col;
  coord_t           px;
  logic             walking;

  assign walking = cur.valid && (phase < 6'(TILE_W));
  assign col     = ODD ? AW'(TILE_W - 1 - int'(phase)) : AW'(phase);
  assign px      = cur.tile_x + coord_t'(col);

  function automatic logic covers(cell_rec_t r, coord_t x);
    fix16_t xf, l, h;
    xf = fix16_t'(32'(x) <<< XFRAC);
    if (r.empty) return 1'b0;
    unique case (r.mode)
      MODE_UPPER: begin
        l = (r.m0 < r.m1) ? r.m0 : r.m1;
        h = (r.m0 < r.m1) ? r.m1 : r.m0;
        return (xf >= l) && (xf < h);
      end
      MODE_LOWER: begin
        l = (r.m1 < r.m2) ? r.m1 : r.m2;
        h = (r.m1 < r.m2) ? r.m2 : r.m1;
        return (xf >= l) && (xf < h);
      end
      MODE_TOP: begin
        if (r.yv0 == r.yv1) begin
          // horizontal top edge: edge 1 gives x0, edge 0 gives x1
          l = (r.m0 < r.m1) ? r.m0 : r.m1;
          h = (r.m0 < r.m1) ? r.m1 : r.m0;
          return (xf >= l) && (xf <= h);
        end
        return xf == r.m1;
      end
      MODE_BOT: return xf == r.m2;
      default:  return 1'b0;
    endcase
  endfunction

  // read port
  assign rd_en   = walking;
  assign rd_bank = cur.bank;
  assign rd_addr = col;

  // write port
  assign wr_en   = s2_v;
  assign wr_bank = cur.bank;
  assign wr_addr = s2_addr;
  assign wr_z    = s2_z;
  assign wr_idx  = s2_idx;

  logic s1_closer;
  assign s1_closer = $signed({s1_z[Z_W-1], s1_z}) < $signed({1'b0, 8'd0, rd_z});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      rec_out <= '0;
      phase   <= 6'(STEP_CLKS);
      zr      <= '0;
      s1_v    <= 1'b0;
      s1_addr <= '0;
      s1_z    <= '0;
      s1_cov  <= 1'b0;
      s2_v    <= 1'b0;
      s2_addr <= '0;
      s2_z    <= '0;
      s2_idx  <= '0;
    end else begin
      // stage 0: step along the line
      if (start) begin
        cur   <= rec_in;
        phase <= '0;
        zr    <= rec_in.z;
      end else begin
        if (phase < 6'(STEP_CLKS)) phase <= phase + 6'd1;
        if (walking && phase != 6'(TILE_W - 1))
          zr <= ODD ? zr - cur.e : zr + cur.e;
      end
      // stage 1: cover test, Z compare
      s1_v    <= walking && !start;
      s1_addr <= col;
      s1_z    <= zr;
      s1_cov  <= covers(cur, px);
      // stage 2: write
      s2_v    <= 1'b0;
      if (s1_v) begin
        s2_addr <= s1_addr;
        if (s1_cov && (cur.first || s1_closer)) begin
          s2_v   <= 1'b1;
          s2_z   <= s1_z[ZBUF_W-1:0];
          s2_idx <= cur.idx;
        end else if (cur.first) begin
          s2_v   <= 1'b1;
          s2_z   <= Z_FAR;
          s2_idx <= NO_TRI;
        end
      end
      // record for the next line, ready one clock before the next step
      if (phase == 6'(STEP_CLKS - 2)) begin
        rec_out       <= cur;
        rec_out.y     <= cur.y + coord_t'(1);
        rec_out.m0    <= cur.m0 + cur.a0;
        rec_out.m1    <= cur.m1 + cur.a1;
        rec_out.m2    <= cur.m2 + cur.a2;
        rec_out.mode  <= mode_y_f(cur.y + coord_t'(1), cur.yv0, cur.yv1, cur.yv2);
        rec_out.z     <= zr + cur.f;
      end
    end
  end
endmodule
