// Testbench for fp_mul_int: random coefficients times random screen
// coordinates (small, full range, negative and zero), one per clock with
// gaps, checked against real arithmetic to within one unit in the last
// place, plus the three-clock latency.
module tb_fp_mul_int;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, y;
  logic signed [15:0] n = 0;
  fp_mul_int dut (.*);

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
    if (!(close(y, e, 1.0) || (e == 0.0 && y[30:0] == 0)) || cyc - c != 3) begin
      failures++;
      if (failures < 10) $display("got %g expected %g (latency %0d)", f2r(y), e, cyc - c);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      a = rand_f(-20, 20);
      n = 16'($urandom);
      if (k % 3 == 0) n = 16'(int'($urandom_range(600)) - 300);
      if (k % 50 == 0) n = 0;
      if (in_valid) begin
        exp_q.push_back(f2r(a) * real'(n));
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
