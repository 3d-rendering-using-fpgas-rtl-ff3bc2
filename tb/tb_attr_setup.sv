// Testbench for attr_setup: random triangles (screen coordinates up to 320x200
// and beyond, thin and large ones) with random attribute values, one per clock
// with gaps. Each plane is compared with the exact solution computed in real
// arithmetic; the tolerance is a few single precision rounding errors of the
// magnitudes involved in each coefficient. The 29-clock latency and the
// evaluation of the plane back at the three vertices are checked too, as is
// the constant plane given to zero-area triangles.
module tb_attr_setup;
  import r3d_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic   in_valid = 0, out_valid;
  coord_t x0 = 0, y0 = 0, x1 = 0, y1 = 0, x2 = 0, y2 = 0;
  f32_t   p0 = 0, p1 = 0, p2 = 0;
  plane_t plane;
  attr_setup dut (.*);

  typedef struct {
    real a, b, c;       // exact plane
    real ta, tb, tc;    // tolerances
    real xs[3], ys[3], ps[3];
    int  cyc;
  } exp_t;
  exp_t q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic bit near(real got, real ex, real tol);
    return absr(got - ex) <= tol;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    real ga, gb, gc;
    bit ok;
    e = q.pop_front();
    ga = f2r(plane.a); gb = f2r(plane.b); gc = f2r(plane.c);
    ok = near(ga, e.a, e.ta) && near(gb, e.b, e.tb) && near(gc, e.c, e.tc) && cyc - e.cyc == 29;
    for (int k = 0; k < 3; k++)
      ok &= near(ga * e.xs[k] + gb * e.ys[k] + gc, e.ps[k],
                 e.tc + e.ta * absr(e.xs[k]) + e.tb * absr(e.ys[k]));
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("got a=%g b=%g c=%g expected %g %g %g (tol %g %g %g) latency %0d",
                 ga, gb, gc, e.a, e.b, e.c, e.ta, e.tb, e.tc, cyc - e.cyc);
    end
  end

  localparam real EPS = 1.0 / 8388608.0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      exp_t e;
      real dx1, dy1, dx2, dy2, det, d1, d2, na, nb, sa, sb, ra, rb;
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      do begin
        int span;
        span = (k % 5 == 0) ? 20 : 400;
        x0 = coord_t'($urandom_range(span)) - 40; y0 = coord_t'($urandom_range(span)) - 40;
        x1 = coord_t'($urandom_range(span)) - 40; y1 = coord_t'($urandom_range(span)) - 40;
        x2 = coord_t'($urandom_range(span)) - 40; y2 = coord_t'($urandom_range(span)) - 40;
        det = real'(int'(x1 - x0) * int'(y2 - y0) - int'(x2 - x0) * int'(y1 - y0));
      end while (det == 0.0 && k % 23 != 0);
      if (k % 23 == 0) begin x1 = x0 + 3; y1 = y0 + 2; x2 = x0 - 6; y2 = y0 - 4; det = 0.0; end
      p0 = rand_f(-8, 8); p1 = rand_f(-8, 8); p2 = rand_f(-8, 8);
      if (k % 7 == 0) begin p1 = p0; p2 = p0; end    // constant attribute
      if (!in_valid) continue;
      e.xs = '{real'(x0), real'(x1), real'(x2)};
      e.ys = '{real'(y0), real'(y1), real'(y2)};
      e.ps = '{f2r(p0), f2r(p1), f2r(p2)};
      dx1 = e.xs[1] - e.xs[0]; dy1 = e.ys[1] - e.ys[0];
      dx2 = e.xs[2] - e.xs[0]; dy2 = e.ys[2] - e.ys[0];
      d1 = e.ps[1] - e.ps[0]; d2 = e.ps[2] - e.ps[0];
      if (det == 0.0) begin
        e.a = 0.0; e.b = 0.0; e.c = e.ps[0]; e.ta = 0.0; e.tb = 0.0; e.tc = 0.0;
        e.ps[1] = e.ps[0]; e.ps[2] = e.ps[0];
        e.cyc = cyc;
        q.push_back(e);
        continue;
      end
      na = d1 * dy2 - d2 * dy1;
      nb = d2 * dx1 - d1 * dx2;
      e.a = na / det; e.b = nb / det;
      e.c = e.ps[0] - (e.a * e.xs[0] + e.b * e.ys[0]);
      // error budget: rounding of the differences, products, numerator and quotient
      sa = (absr(d1 * dy2) + absr(d2 * dy1)) * 3.0 + absr(na) * 2.0;
      sb = (absr(d2 * dx1) + absr(d1 * dx2)) * 3.0 + absr(nb) * 2.0;
      ra = (sa + (absr(e.ps[0]) + absr(e.ps[1]) + absr(e.ps[2])) * (absr(dy1) + absr(dy2)) * 2.0)
           * 4.0 * EPS / absr(det);
      rb = (sb + (absr(e.ps[0]) + absr(e.ps[1]) + absr(e.ps[2])) * (absr(dx1) + absr(dx2)) * 2.0)
           * 4.0 * EPS / absr(det);
      e.ta = ra + 1e-30; e.tb = rb + 1e-30;
      e.tc = ra * absr(e.xs[0]) + rb * absr(e.ys[0])
           + (absr(e.ps[0]) + absr(e.a * e.xs[0]) + absr(e.b * e.ys[0])) * 4.0 * EPS + 1e-30;
      e.cyc = cyc;
      q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
