// Testbench for hsr_compute_m0: random triangles, the three intersections and
// mode_y of the tile's top line against the direct per-line formula.
module tb_hsr_compute_m0;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  tri_in_t tri_i;
  fix16_t m0, m1, m2;
  mode_y_t mode;
  hsr_compute_m0 dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tri_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      tri_in_t t;
      t = rand_tri(32 * int'($urandom_range(9)), 16 * int'($urandom_range(12)), n, 24);
      @(negedge clk); tri_i = t; in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || m0 !== ref_edge(t.x1, t.y1, t.a0, int'(t.tile_y)) ||
          m1 !== ref_edge(t.x0, t.y0, t.a1, int'(t.tile_y)) ||
          m2 !== ref_edge(t.x2, t.y2, t.a2, int'(t.tile_y)) ||
          mode !== ref_mode(int'(t.tile_y), t)) begin
        failures++;
        if (failures < 5) $display("mismatch tri %0d: m %h %h %h mode %0d", n, m0, m1, m2, mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
