// fp_add: IEEE-754 single precision adder, five pipeline stages.
//
// Stage 1 unpacks both operands and orders them by magnitude, stage 2 aligns
// the smaller significand (keeping guard, round and sticky bits), stage 3 adds
// or subtracts, stage 4 normalises with a leading-zero count and stage 5
// rounds to nearest even and packs. Denormal inputs are read as zero and
// results below the normal range flush to zero; infinities pass through and
// overflow gives infinity; NaN is not generated or propagated. A new
// operation can enter every clock; the result appears five clocks later
// (out_valid follows in_valid). The stage count follows the published
// design; the split into stages and the special-value handling are this
// design's choice.
module fp_add (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  // ---- stage 1: unpack, order by magnitude
  logic        s1_v, s1_sx, s1_sy, s1_inf;
  logic [7:0]  s1_ex;
  logic [7:0]  s1_d;
  logic [23:0] s1_mx, s1_my;
  logic [31:0] s1_infv;
  logic [31:0] op_hi, op_lo;
  logic        swap;
  assign swap  = b[30:0] > a[30:0];
  assign op_hi   = swap ? b : a;
  assign op_lo = swap ? a : b;

  // ---- stage 2: align
  logic        s2_v, s2_sx, s2_sy, s2_inf;
  logic [7:0]  s2_ex;
  logic [26:0] s2_mx, s2_my;   // significand, guard, round, sticky
  logic [31:0] s2_infv;
  logic [49:0] sh_full;
  logic        sticky;
  always_comb begin
    sh_full = {s1_my, 26'b0} >> s1_d;
    sticky  = |sh_full[23:0];
  end

  // ---- stage 3: add
  logic        s3_v, s3_s, s3_inf;
  logic [7:0]  s3_ex;
  logic [27:0] s3_m;
  logic [31:0] s3_infv;

  // ---- stage 4: normalise
  logic        s4_v, s4_s, s4_inf, s4_zero;
  logic [9:0]  s4_e;
  logic [26:0] s4_m;
  logic [31:0] s4_infv;
  logic [4:0]  lz;
  always_comb begin
    lz = 5'd27;
    for (int i = 0; i <= 26; i++) if (s3_m[i]) lz = 5'(26 - i);
  end

  // ---- stage 5: round, pack
  logic [24:0] rnd;
  logic        rup;
  logic [9:0]  e5;
  always_comb begin
    rup = s4_m[2] && (s4_m[1] || s4_m[0] || s4_m[3]);
    rnd = {1'b0, s4_m[26:3]} + 25'(rup);
    e5  = rnd[24] ? s4_e + 10'd1 : s4_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 0; s2_v <= 0; s3_v <= 0; s4_v <= 0; out_valid <= 0;
      s1_sx <= 0; s1_sy <= 0; s1_inf <= 0; s1_ex <= 0; s1_d <= 0; s1_mx <= 0; s1_my <= 0; s1_infv <= 0;
      s2_sx <= 0; s2_sy <= 0; s2_inf <= 0; s2_ex <= 0; s2_mx <= 0; s2_my <= 0; s2_infv <= 0;
      s3_s <= 0; s3_inf <= 0; s3_ex <= 0; s3_m <= 0; s3_infv <= 0;
      s4_s <= 0; s4_inf <= 0; s4_zero <= 0; s4_e <= 0; s4_m <= 0; s4_infv <= 0;
      y <= 0;
    end else begin
      // 1
      s1_v    <= in_valid;
      s1_sx   <= op_hi[31];
      s1_sy   <= op_lo[31];
      s1_ex   <= op_hi[30:23];
      s1_mx   <= (op_hi[30:23] == 0) ? 24'd0 : {1'b1, op_hi[22:0]};
      s1_my   <= (op_lo[30:23] == 0) ? 24'd0 : {1'b1, op_lo[22:0]};
      s1_d    <= (op_lo[30:23] == 0) ? 8'd0 : op_hi[30:23] - op_lo[30:23];
      s1_inf  <= op_hi[30:23] == 8'hff;
      s1_infv <= {op_hi[31], 8'hff, 23'd0};
      // 2
      s2_v    <= s1_v;
      s2_sx   <= s1_sx;
      s2_sy   <= s1_sy;
      s2_ex   <= s1_ex;
      s2_mx   <= {s1_mx, 3'b000};
      s2_my   <= (s1_d > 8'd26) ? {26'd0, |s1_my} : {sh_full[49:24], sticky};
      s2_inf  <= s1_inf;
      s2_infv <= s1_infv;
      // 3
      s3_v    <= s2_v;
      s3_s    <= s2_sx;
      s3_ex   <= s2_ex;
      s3_m    <= (s2_sx == s2_sy) ? {1'b0, s2_mx} + {1'b0, s2_my} : {1'b0, s2_mx} - {1'b0, s2_my};
      s3_inf  <= s2_inf;
      s3_infv <= s2_infv;
      // 4
      s4_v    <= s3_v;
      s4_s    <= s3_s;
      s4_inf  <= s3_inf;
      s4_infv <= s3_infv;
      s4_zero <= (s3_m == 0);
      if (s3_m[27]) begin
        s4_m <= {s3_m[27:2], s3_m[1] | s3_m[0]};
        s4_e <= {2'b0, s3_ex} + 10'd1;
      end else begin
        s4_m <= s3_m[26:0] << lz;
        s4_e <= {2'b0, s3_ex} - {5'd0, lz};
      end
      // 5
      out_valid <= s4_v;
      if (s4_inf)                                 y <= s4_infv;
      else if (s4_zero || $signed(e5) <= 0)       y <= 32'd0;
      else if ($signed(e5) >= 255)                y <= {s4_s, 8'hff, 23'd0};
      else                                        y <= {s4_s, e5[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end
endmodule
