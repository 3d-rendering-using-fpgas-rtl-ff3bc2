// fp_mul_int: IEEE-754 single precision value times a signed integer, three
// pipeline stages.
//
// The interpolators multiply floating-point plane coefficients by integer
// screen coordinates, so the integer operand needs no conversion: stage 1
// unpacks and takes the integer's magnitude, stage 2 multiplies the 24-bit
// significand by it, stage 3 finds the leading one of the product, rounds to
// nearest even and packs. Denormal inputs read as zero, underflow flushes
// to zero, overflow and infinite inputs give infinity. One operation per
// clock; out_valid follows in_valid by three clocks. The mixed operand types
// and the stage count follow the published design; the rest is this
// design's choice.
module fp_mul_int #(
  parameter int unsigned IW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [31:0]          a,
  input  logic signed [IW-1:0] n,
  output logic                 out_valid,
  output logic [31:0]          y
);
  localparam int PW = 24 + IW;

  logic          s1_v, s1_s, s1_inf;
  logic [7:0]    s1_e;
  logic [23:0]   s1_m;
  logic [IW-1:0] s1_n;
  logic          s2_v, s2_s, s2_inf;
  logic [7:0]    s2_e;
  logic [PW-1:0] s2_p;

  // stage 3 combinational: leading one, round, pack
  int            lead;
  logic [PW+1:0] norm;      // significand at bits [PW+1 -: 24], then guard and sticky
  logic [24:0]   rnd;
  logic          g, st, rup;
  logic signed [10:0] e3;
  always_comb begin
    lead = 0;
    for (int i = 0; i < PW; i++) if (s2_p[i]) lead = i;
    norm = {s2_p, 2'b00} << (PW - 1 - lead);
    g    = norm[PW+1-24];
    st   = |norm[PW-24:0];
    rup  = g && (st || norm[PW+1-23]);
    rnd  = {1'b0, norm[PW+1 -: 24]} + 25'(rup);
    e3   = 11'(s2_e) + 11'(lead) - 11'sd23 + (rnd[24] ? 11'sd1 : 11'sd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s1_s <= 0; s1_inf <= 0; s1_e <= 0; s1_m <= 0; s1_n <= 0;
      s2_v <= 0; s2_s <= 0; s2_inf <= 0; s2_e <= 0; s2_p <= 0;
      out_valid <= 0; y <= 0;
    end else begin
      s1_v   <= in_valid;
      s1_s   <= a[31] ^ n[IW-1];
      s1_inf <= a[30:23] == 8'hff;
      s1_e   <= a[30:23];
      s1_m   <= (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]};
      s1_n   <= n[IW-1] ? IW'(-n) : IW'(n);

      s2_v   <= s1_v;
      s2_s   <= s1_s;
      s2_inf <= s1_inf;
      s2_e   <= s1_e;
      s2_p   <= PW'(s1_m) * PW'(s1_n);

      out_valid <= s2_v;
      if (s2_inf)                       y <= {s2_s, 8'hff, 23'd0};
      else if (s2_p == 0 || e3 <= 0)    y <= 32'd0;
      else if (e3 >= 255)               y <= {s2_s, 8'hff, 23'd0};
      else                              y <= {s2_s, e3[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end
endmodule
