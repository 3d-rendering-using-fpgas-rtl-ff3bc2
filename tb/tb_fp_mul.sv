// Testbench for fp_mul: random products over a wide exponent range, one per
// clock with gaps, checked against the exact product to within half a unit in the
// last place; zero operands, overflow to infinity and the three-clock latency
// are checked as well.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  fp_mul dut (.*);

  real exp_q [$];
  int  cyc_q [$];
  bit  inf_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real e;
    int c;
    bit inf;
    e = exp_q.pop_front();
    c = cyc_q.pop_front();
    inf = inf_q.pop_front();
    checks++;
    if ((inf ? (y[30:0] != 31'h7f800000) : !(close(y, e, 0.5) || (e == 0.0 && y[30:0] == 0)))
        || cyc - c != 3) begin
      failures++;
      if (failures < 10) $display("got %g expected %g inf %0d (latency %0d)", f2r(y), e, inf, cyc - c);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      a = rand_f(-40, 40);
      b = rand_f(-40, 40);
      if (k % 40 == 0) b = 0;
      if (k % 97 == 0) begin a = rand_f(100, 120); b = rand_f(100, 120); end
      if (in_valid) begin
        exp_q.push_back(f2r(a) * f2r(b));
        inf_q.push_back(k % 97 == 0);
        cyc_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
