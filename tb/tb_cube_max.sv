// Testbench for cube_max: random direction vectors in cube mode and random
// values in pass-through mode. For cube mode the face, the divisor input and
// the arranged pair are checked against the face table written out per
// face here; in pass-through mode RHW, s and t must come through unchanged
// one clock later.
module tb_cube_max;
  import r3d_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, cube = 0, out_valid;
  f32_t s = 0, t = 0, r = 0, rhw = 0, div_in, sc, tc;
  logic [2:0] face;
  cube_max dut (.*);
  int faces_seen [6];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real vs, vt, vr, as, at, ar, ma, esc, etc;
      int ef;
      @(negedge clk);
      in_valid = 1;
      cube = (n % 4 != 0);
      s = rand_f(-3, 3); t = rand_f(-3, 3); r = rand_f(-3, 3); rhw = rand_f(-5, 5);
      vs = f2r(s); vt = f2r(t); vr = f2r(r);
      as = vs < 0 ? -vs : vs; at = vt < 0 ? -vt : vt; ar = vr < 0 ? -vr : vr;
      if (as >= at && as >= ar) begin
        ma = as;
        if (vs >= 0) begin ef = 0; esc = -vr; etc = -vt; end
        else         begin ef = 1; esc =  vr; etc = -vt; end
      end else if (at >= ar) begin
        ma = at;
        if (vt >= 0) begin ef = 2; esc = vs; etc =  vr; end
        else         begin ef = 3; esc = vs; etc = -vr; end
      end else begin
        ma = ar;
        if (vr >= 0) begin ef = 4; esc =  vs; etc = -vt; end
        else         begin ef = 5; esc = -vs; etc = -vt; end
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      else if (!cube) begin
        if (div_in !== rhw || sc !== s || tc !== t || face !== 0) failures++;
      end else begin
        faces_seen[ef]++;
        if (int'(face) != ef || f2r(div_in) != ma || f2r(sc) != esc || f2r(tc) != etc) begin
          failures++;
          if (failures < 5) $display("face %0d (exp %0d) div %g sc %g tc %g", face, ef, f2r(div_in), f2r(sc), f2r(tc));
        end
      end
    end
    foreach (faces_seen[f]) begin
      checks++;
      if (faces_seen[f] == 0) begin failures++; $display("face %0d never chosen", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
