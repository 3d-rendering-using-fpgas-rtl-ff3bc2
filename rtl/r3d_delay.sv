// r3d_delay: a W-bit shift register of D clocks (D >= 1), used to keep side
// information in step with the floating-point pipelines. Reset clears it.
module r3d_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [D];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '{default: '0};
    else begin
      sr[0] <= d;
      for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
    end
  end
  assign q = sr[D-1];
endmodule
