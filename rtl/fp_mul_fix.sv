// fp_mul_fix: product of two IEEE-754 single precision values delivered as a
// signed fixed-point number (Compute U / Compute V), three pipeline stages.
//
// Used to turn the perspective-divided texture coordinates into fixed point:
// u = s * (1/RHW), v = t * (1/RHW). Stage 1 unpacks, stage 2 multiplies the
// significands, stage 3 shifts the 48-bit product to the output's binary
// point, rounds to nearest and saturates to the output range. Denormal
// inputs read as zero; an infinite input saturates. One operation per
// clock; out_valid follows in_valid by three clocks. The function and stage
// count follow the published design; the output format (default Q16.16) is
// this design's choice.
module fp_mul_fix #(
  parameter int unsigned OW   = 32,
  parameter int unsigned FRAC = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [31:0]          a,
  input  logic [31:0]          b,
  output logic                 out_valid,
  output logic signed [OW-1:0] y
);
  localparam logic signed [OW-1:0] MAXV = {1'b0, {(OW-1){1'b1}}};

  logic        s1_v, s1_s, s1_zero, s1_inf;
  logic signed [10:0] s1_sh;
  logic [23:0] s1_ma, s1_mb;
  logic        s2_v, s2_s, s2_zero, s2_inf;
  logic signed [10:0] s2_sh;
  logic [47:0] s2_p;

  // stage 3 combinational: scale by 2^sh, round, saturate
  logic [OW:0]  mag;
  logic         ovf;
  logic [48:0]  rs;
  always_comb begin
    mag = '0;
    ovf = 1'b0;
    rs  = '0;
    if (s2_sh >= 0) begin
      if (s2_sh > 11'(OW)) ovf = 1'b1;
      else begin
        rs  = {1'b0, s2_p} << s2_sh;
        ovf = |(rs >> (OW - 1)) || (s2_p != 0 && s2_sh > 11'sd30);
        mag = (OW+1)'(rs);
      end
    end else if (s2_sh > -11'sd49) begin
      // add half an output LSB, then drop the bits below it
      rs  = ({1'b0, s2_p} + (49'd1 << (-s2_sh - 1))) >> (-s2_sh);
      ovf = |(rs >> (OW - 1));
      mag = (OW+1)'(rs);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s1_s <= 0; s1_zero <= 0; s1_inf <= 0; s1_sh <= 0; s1_ma <= 0; s1_mb <= 0;
      s2_v <= 0; s2_s <= 0; s2_zero <= 0; s2_inf <= 0; s2_sh <= 0; s2_p <= 0;
      out_valid <= 0; y <= 0;
    end else begin
      s1_v    <= in_valid;
      s1_s    <= a[31] ^ b[31];
      s1_zero <= (a[30:23] == 0) || (b[30:23] == 0);
      s1_inf  <= (a[30:23] == 8'hff) || (b[30:23] == 8'hff);
      // value = ma*mb * 2^(ea+eb-254-46); output = value * 2^FRAC
      s1_sh   <= 11'(a[30:23]) + 11'(b[30:23]) - 11'sd300 + 11'(FRAC);
      s1_ma   <= {1'b1, a[22:0]};
      s1_mb   <= {1'b1, b[22:0]};

      s2_v    <= s1_v;
      s2_s    <= s1_s;
      s2_zero <= s1_zero;
      s2_inf  <= s1_inf;
      s2_sh   <= s1_sh;
      s2_p    <= 48'(s1_ma) * 48'(s1_mb);

      out_valid <= s2_v;
      if (s2_zero)              y <= '0;
      else if (s2_inf || ovf)   y <= s2_s ? -MAXV : MAXV;
      else                      y <= s2_s ? -$signed(mag[OW-1:0]) : $signed(mag[OW-1:0]);
    end
  end
endmodule
