// Testbench for hsr_compute_z0: Z at random tile origins against the plane
// equation evaluated in the testbench.
module tb_hsr_compute_z0;
  import r3d_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  coord_t x, y;
  zval_t e, f, g, z0;
  hsr_compute_z0 dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; e = '0; f = '0; g = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      tri_in_t t;
      t = rand_tri(32 * int'($urandom_range(9)), 16 * int'($urandom_range(12)), n, 24);
      @(negedge clk);
      x = t.tile_x; y = t.tile_y; e = t.e; f = t.f; g = t.g; in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || z0 !== ref_z(t, int'(t.tile_x), int'(t.tile_y))) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: %h vs %h", n, z0, ref_z(t, int'(t.tile_x), int'(t.tile_y)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
