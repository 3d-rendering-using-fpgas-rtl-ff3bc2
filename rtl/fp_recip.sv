// fp_recip: reciprocal of an IEEE-754 single precision value (the divisor),
// eight pipeline stages.
//
// The divisor of the shading pipeline turns the interpolated RHW (or, for a
// cube map, the major-axis component) into a reciprocal that Compute U and
// Compute V multiply with. It is iterative in the Newton-Raphson sense but
// fully pipelined: with the significand scaled to D in [0.5, 1), stage 1
// forms the linear estimate x0 = 48/17 - 32/17*D (error below 1/17), stages
// 2-7 run three iterations x' = x*(2 - D*x), two stages each, and stage 8
// normalises, rounds and packs. Three iterations take the error below 2^-28,
// so the result is within one unit in the last place. Zero gives infinity,
// infinity gives zero, results below the normal range flush to zero, the
// sign is kept. One operation per clock; out_valid follows in_valid by eight
// clocks. The iterative method and the stage count follow the published
// design; the estimate and iteration count are this design's choice.
module fp_recip (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  output logic        out_valid,
  output logic [31:0] y
);
  // fixed point: D and the products are Q0.32 / Q2.30
  localparam logic [31:0] C48_17 = 32'hB4B4B4B5;  // 48/17 in Q2.30
  localparam logic [31:0] C32_17 = 32'hF0F0F0F1;  // 32/17 in Q1.31

  typedef struct packed {
    logic        v;
    logic        s;
    logic        zero;
    logic        inf;
    logic [7:0]  e;
    logic [31:0] d;    // D in Q0.32
    logic [31:0] x;    // estimate in Q2.30
    logic [31:0] t;    // D*x in Q2.30
  } st_t;

  st_t st [1:7];

  function automatic logic [31:0] mul_dx(logic [31:0] d, logic [31:0] x);
    logic [63:0] p;
    p = 64'(d) * 64'(x);            // Q2.62
    return p[63:32];                // Q2.30
  endfunction

  function automatic logic [31:0] mul_x2t(logic [31:0] x, logic [31:0] t);
    logic [31:0] two_t;
    logic [63:0] p;
    two_t = 32'h8000_0000 - t;      // 2 - t in Q2.30
    p     = 64'(x) * 64'(two_t);    // Q4.60
    return p[61:30];                // Q2.30
  endfunction

  // stage 8 combinational: normalise, round
  logic [31:0] xf;
  logic [24:0] rnd;
  logic        hi;
  logic [9:0]  eo;
  always_comb begin
    xf  = st[7].x;
    hi  = xf[31];                          // 1/D reached 2 (D = 0.5)
    rnd = hi ? {1'b0, xf[31:8]} + 25'(xf[7]) : {1'b0, xf[30:7]} + 25'(xf[6]);
    // 1/a = (1/D) * 2^(126-e): biased exponent 253 - e when 1 <= 1/D < 2
    eo  = 10'd253 - {2'b0, st[7].e} + (hi ? 10'd1 : 10'd0) + (rnd[24] ? 10'd1 : 10'd0);
  end

  logic [63:0] d_seed;
  assign d_seed = 64'({1'b1, a[22:0], 8'b0}) * 64'(C32_17);   // Q1.63

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 7; i++) st[i] <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      // 1: unpack, linear estimate
      st[1].v    <= in_valid;
      st[1].s    <= a[31];
      st[1].zero <= a[30:23] == 0;
      st[1].inf  <= a[30:23] == 8'hff;
      st[1].e    <= a[30:23];
      st[1].d    <= {1'b1, a[22:0], 8'b0};
      st[1].x    <= C48_17 - {1'b0, d_seed[63:33]};
      st[1].t    <= '0;
      // 2..7: three Newton-Raphson iterations
      for (int i = 2; i <= 7; i++) begin
        st[i] <= st[i-1];
        if (i % 2 == 0) st[i].t <= mul_dx(st[i-1].d, st[i-1].x);
        else            st[i].x <= mul_x2t(st[i-1].x, st[i-1].t);
      end
      // 8: pack
      out_valid <= st[7].v;
      if (st[7].zero)                     y <= {st[7].s, 8'hff, 23'd0};
      else if (st[7].inf)                 y <= {st[7].s, 31'd0};
      else if ($signed(eo) <= 0 || eo[9]) y <= {st[7].s, 31'd0};
      else                                y <= {st[7].s, eo[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
    end
  end
endmodule
