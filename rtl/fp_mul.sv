// fp_mul: IEEE-754 single precision multiplier, three pipeline stages.
//
// Used by the attribute setup to scale the plane numerators by 1/det. Stage 1
// unpacks both operands and adds the exponents, stage 2 multiplies the two
// 24-bit significands, stage 3 finds the leading one of the 48-bit product,
// rounds to nearest even and packs. Denormal inputs read as zero, underflow
// flushes to zero, overflow and infinite inputs give infinity (0 * inf gives
// 0; NaN is never produced). One operation per clock; out_valid follows
// in_valid by three clocks. The document only says the setup works in
// single precision; the unit's structure is this design's choice.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  logic               s1_v, s1_s, s1_inf, s1_zero;
  logic signed [10:0] s1_e;
  logic [23:0]        s1_ma, s1_mb;
  logic               s2_v, s2_s, s2_inf, s2_zero;
  logic signed [10:0] s2_e;
  logic [47:0]        s2_p;

  // stage 3 combinational: leading one, round, pack
  int                 lead;
  logic [49:0]        norm;
  logic [24:0]        rnd;
  logic               g, st, rup;
  logic signed [11:0] e3;
  always_comb begin
    lead = 0;
    for (int i = 0; i < 48; i++) if (s2_p[i]) lead = i;
    norm = {s2_p, 2'b00} << (47 - lead);
    g    = norm[25];
    st   = |norm[24:0];
    rup  = g && (st || norm[26]);
    rnd  = {1'b0, norm[49:26]} + 25'(rup);
    // value = p * 2^(ea+eb-300), biased exponent = ea+eb-173+lead
    e3   = 12'(s2_e) + 12'(lead) - 12'sd23 + (rnd[24] ? 12'sd1 : 12'sd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s1_s <= 0; s1_inf <= 0; s1_zero <= 0; s1_e <= 0; s1_ma <= 0; s1_mb <= 0;
      s2_v <= 0; s2_s <= 0; s2_inf <= 0; s2_zero <= 0; s2_e <= 0; s2_p <= 0;
      out_valid <= 0; y <= 0;
    end else begin
      s1_v    <= in_valid;
      s1_s    <= a[31] ^ b[31];
      s1_zero <= a[30:23] == 0 || b[30:23] == 0;
      s1_inf  <= a[30:23] == 8'hff || b[30:23] == 8'hff;
      s1_e    <= 11'(a[30:23]) + 11'(b[30:23]) - 11'sd150;
      s1_ma   <= {1'b1, a[22:0]};
      s1_mb   <= {1'b1, b[22:0]};

      s2_v    <= s1_v;
      s2_s    <= s1_s;
      s2_zero <= s1_zero;
      s2_inf  <= s1_inf && !s1_zero;
      s2_e    <= s1_e;
      s2_p    <= 48'(s1_ma) * 48'(s1_mb);

      out_valid <= s2_v;
      if (s2_zero)         y <= 32'd0;
      else if (s2_inf)     y <= {s2_s, 8'hff, 23'd0};
      else if (e3 <= 0)    y <= 32'd0;
      else if (e3 >= 255)  y <= {s2_s, 8'hff, 23'd0};
      else                 y <= {s2_s, e3[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end
endmodule
