// Testbench for hsr_line_buffer: fills both banks through the write port and
// reads them back through the compare port and the reader port, checking the
// banks are independent and reads take one clock.
module tb_hsr_line_buffer;
  import r3d_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rd_en = 0, rd_bank = 0, wr_en = 0, wr_bank = 0, gu_bank = 0;
  logic [4:0] rd_addr = 0, wr_addr = 0, gu_addr = 0;
  zbuf_t rd_z, wr_z = 0, gu_z;
  tri_idx_t wr_idx = 0, gu_idx;
  zbuf_t    mz [2][32];
  tri_idx_t mi [2][32];
  hsr_line_buffer dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 32; a++) begin
        mz[b][a] = zbuf_t'($urandom); mi[b][a] = tri_idx_t'($urandom);
        @(negedge clk);
        wr_en = 1; wr_bank = b[0]; wr_addr = a[4:0]; wr_z = mz[b][a]; wr_idx = mi[b][a];
      end
    @(negedge clk) wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        rd_en = 1; rd_bank = b[0]; rd_addr = a[4:0];
        gu_bank = ~b[0]; gu_addr = 5'(31 - a);
        @(negedge clk);
        rd_en = 0;
        checks += 2;
        if (rd_z !== mz[b][a]) failures++;
        if (gu_z !== mz[1-b][31-a] || gu_idx !== mi[1-b][31-a]) failures++;
      end
    // rd_en low holds the read data
    @(negedge clk); rd_bank = 0; rd_addr = 0; rd_en = 1;
    @(negedge clk); rd_en = 0; rd_addr = 5;
    @(negedge clk); checks++;
    if (rd_z !== mz[0][0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
