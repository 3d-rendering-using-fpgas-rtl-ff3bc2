// Testbench for fp_add: a stream of random operand pairs (one per clock, with
// gaps), including opposite signs, equal magnitudes and wide exponent
// differences, checked against real arithmetic to within one unit in the
// last place, plus the five-clock latency.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0, y;
  fp_add dut (.*);

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
    if (!(close(y, e, 1.0) || (e == 0.0 && y[30:0] == 0)) || cyc - c != 5) begin
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
      a = rand_f(-20, 20);
      case (n % 4)
        0: b = rand_f(-20, 20);
        1: b = {~a[31], a[30:0]};                         // exact cancellation
        2: b = {~a[31], a[30:23], 23'($urandom)};         // close magnitudes
        default: b = rand_f(-40, 40);
      endcase
      if (in_valid) begin
        exp_q.push_back(f2r(a) + f2r(b));
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
