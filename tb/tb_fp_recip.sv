// Testbench for fp_recip: reciprocals of random values over a wide range
// and of powers of two, one per clock with gaps, checked against real
// division to within one unit in the last place, plus the eight-clock
// latency and the zero-to-infinity case.
module tb_fp_recip;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, y;
  fp_recip dut (.*);

  real exp_q [$];
  int  cyc_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && exp_q.size() > 0) begin
    real e;
    int c;
    e = exp_q.pop_front();
    c = cyc_q.pop_front();
    checks++;
    if (!(close(y, e, 1.0) || (e == 0.0 && y[30:0] == 0)) || cyc - c != 8) begin
      failures++;
      if (failures < 10) $display("got %g expected %g (latency %0d) at %0d", f2r(y), e, cyc - c, cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      a = rand_f(-30, 30);
      if (n % 5 == 0) a = {a[31], a[30:23], 23'd0};   // powers of two
      if (in_valid) begin
        exp_q.push_back(1.0 / f2r(a));
        cyc_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    // zero gives infinity
    wait (exp_q.size() == 0);
    @(negedge clk); in_valid = 1; a = 32'h8000_0000;
    @(negedge clk); in_valid = 0;
    repeat (9) @(negedge clk);
    checks++;
    if (y != 32'hff80_0000) begin failures++; $display("1/-0 gave %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
