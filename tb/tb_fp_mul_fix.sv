// Testbench for fp_mul_fix: random products in and beyond the Q16.16
// range, one per clock with gaps. Results inside the range must be the
// nearest fixed-point value (within one LSB), results outside it must
// saturate; the latency must be three clocks.
module tb_fp_mul_fix;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0;
  logic signed [31:0] y;
  fp_mul_fix dut (.*);

  function automatic bit fix_ok(logic signed [31:0] got, real e);
    real d;
    if (e >= 2147483647.0)  return got == 32'sh7fffffff;
    if (e <= -2147483647.0) return got == -32'sh7fffffff;
    d = real'(got) - e;
    return d <= 1.0 && d >= -1.0;
  endfunction

  real exp_q [$];
  int  cyc_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real e;
    int c;
    e = exp_q.pop_front();
    c = cyc_q.pop_front();
    checks++;
    if (!fix_ok(y, e) || cyc - c != 3) begin
      failures++;
      if (failures < 10) $display("got %g expected %g (latency %0d) at %0d", real'(y), e, cyc - c, cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      a = rand_f(-12, 4); b = rand_f(-8, 8);
      if (n % 7 == 0) b = rand_f(10, 20);   // saturates
      if (in_valid) begin
        exp_q.push_back(f2r(a) * f2r(b) * 65536.0);
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
