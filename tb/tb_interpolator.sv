// Testbench for interpolator: three attributes with random plane
// coefficients evaluated at random pixels, one per clock with gaps. Each
// result must match a*x + b*y + c computed in real arithmetic to within a
// few units in the last place of the largest term, and arrive 13 clocks
// after its pixel.
module tb_interpolator;
  import r3d_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  coord_t x = 0, y = 0;
  plane_t [N-1:0] p;
  f32_t   [N-1:0] v;
  interpolator #(.N(N)) dut (.*);

  typedef struct { real e [N]; real tol [N]; int c; } exp_t;
  exp_t q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (cyc - e.c != 13) failures++;
    for (int i = 0; i < N; i++) begin
      real d;
      d = f2r(v[i]) - e.e[i];
      if (d < 0) d = -d;
      checks++;
      if (d > e.tol[i]) begin
        failures++;
        if (failures < 10) $display("ch %0d: got %g expected %g", i, f2r(v[i]), e.e[i]);
      end
    end
  end

  initial begin
    p = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      x = coord_t'(int'($urandom_range(640)) - 160);
      y = coord_t'(int'($urandom_range(400)) - 100);
      for (int i = 0; i < N; i++) begin
        real ax, by, c;
        p[i].a = rand_f(-12, 0);
        p[i].b = rand_f(-12, 0);
        p[i].c = rand_f(-4, 4);
        ax = f2r(p[i].a) * real'(x);
        by = f2r(p[i].b) * real'(y);
        c  = f2r(p[i].c);
        e.e[i] = ax + by + c;
        e.tol[i] = ((ax < 0 ? -ax : ax) + (by < 0 ? -by : by) + (c < 0 ? -c : c)) * 4.0 / 8388608.0;
      end
      e.c = cyc;
      if (in_valid) q.push_back(e);
    end
    @(negedge clk) in_valid = 0;
    repeat (16) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
