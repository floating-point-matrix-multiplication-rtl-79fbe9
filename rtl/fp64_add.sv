// fp64_add: pipelined IEEE-754 double-precision adder, 7 cycles.
//
// Single-path adder (no separate near and far paths): the operands are swapped so that
// the larger magnitude comes first, the smaller significand is aligned with a
// guard, a round and a sticky bit, the two are added or subtracted, a leading-
// zero count (done in a single cycle) normalises the sum, and the result is
// rounded to nearest, ties to even. If rounding overflows the significand the
// exponent is adjusted. Zero operands are supported and an exact zero sum gets
// the IEEE sign (negative only when both operands are negative). Denormal
// operands are read as zero, results below the normal range are flushed to
// zero and results above it become infinity; infinity and NaN operands get
// no special treatment.
//
// Stages: 1 unpack/swap, 2 align, 3 add, 4 leading-zero count and normalise,
// 5 round, 6 range check and pack, 7 output register. The seven-stage depth is
// the adder depth the document lists for its multiply-add unit.
// Interface: in_v/a/b at cycle t give out_v/y at cycle t+7; one operation per cycle.
module fp64_add
  import gemm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_v,
  input  f64_t  a,
  input  f64_t  b,
  output logic  out_v,
  output f64_t  y
);

  // ---------------- stage 1: unpack and order by magnitude
  logic [62:0] mag_a, mag_b;
  logic        a_big;
  always_comb begin
    // a denormal reads as zero
    mag_a = (a[62:52] == 11'd0) ? 63'd0 : a[62:0];
    mag_b = (b[62:52] == 11'd0) ? 63'd0 : b[62:0];
    a_big = (mag_a >= mag_b);
  end

  logic        s1_sx, s1_sy, s1_sboth;
  logic [10:0] s1_ex;
  logic [11:0] s1_d;
  logic [52:0] s1_fx, s1_fy;

  always_ff @(posedge clk) begin
    logic [62:0] mx, my;
    mx = a_big ? mag_a : mag_b;
    my = a_big ? mag_b : mag_a;
    s1_sx    <= a_big ? a[63] : b[63];
    s1_sy    <= a_big ? b[63] : a[63];
    s1_sboth <= a[63] & b[63];
    s1_ex    <= mx[62:52];
    s1_d     <= {1'b0, mx[62:52]} - {1'b0, my[62:52]};
    s1_fx    <= {(mx[62:52] != 11'd0), mx[51:0]};
    s1_fy    <= {(my[62:52] != 11'd0), my[51:0]};
  end

  // ---------------- stage 2: align smaller operand (guard, round, sticky)
  logic [118:0] al_t;
  logic [55:0]  al_y;
  always_comb begin
    al_t = {s1_fy, 2'b00, 64'd0} >> s1_d;
    if (s1_d >= 12'd119) al_y = {55'd0, |s1_fy};
    else                 al_y = {al_t[118:64], |al_t[63:0]};
  end

  logic        s2_sx, s2_sub, s2_sboth;
  logic [10:0] s2_ex;
  logic [55:0] s2_x, s2_y;

  always_ff @(posedge clk) begin
    s2_sx    <= s1_sx;
    s2_sub   <= s1_sx ^ s1_sy;
    s2_sboth <= s1_sboth;
    s2_ex    <= s1_ex;
    s2_x     <= {s1_fx, 3'b000};
    s2_y     <= al_y;
  end

  // ---------------- stage 3: add / subtract (|x| >= |y|, so no negative result)
  logic        s3_sx, s3_sboth;
  logic [10:0] s3_ex;
  logic [56:0] s3_sum;

  always_ff @(posedge clk) begin
    s3_sx    <= s2_sx;
    s3_sboth <= s2_sboth;
    s3_ex    <= s2_ex;
    s3_sum   <= s2_sub ? ({1'b0, s2_x} - {1'b0, s2_y}) : ({1'b0, s2_x} + {1'b0, s2_y});
  end

  // ---------------- stage 4: leading-zero count and normalisation
  logic [5:0]  lz;
  always_comb begin
    lz = 6'd56;
    for (int i = 0; i < 56; i++)
      if (s3_sum[i]) lz = 6'(55 - i);
  end

  logic               s4_s, s4_zero;
  logic signed [13:0] s4_e;
  logic [55:0]        s4_n;   // s4_n[55] is the hidden one

  always_ff @(posedge clk) begin
    s4_zero <= (s3_sum == 57'd0);
    s4_s    <= (s3_sum == 57'd0) ? s3_sboth : s3_sx;
    if (s3_sum[56]) begin
      s4_n <= {s3_sum[56:2], s3_sum[1] | s3_sum[0]};
      s4_e <= $signed({3'b0, s3_ex}) + 14'sd1;
    end else begin
      s4_n <= s3_sum[55:0] << lz;
      s4_e <= $signed({3'b0, s3_ex}) - $signed({8'b0, lz});
    end
  end

  // ---------------- stage 5: round to nearest even
  logic        rd_up;
  logic [53:0] rd_m;
  always_comb begin
    rd_up = s4_n[2] & ((s4_n[1] | s4_n[0]) | s4_n[3]);
    rd_m  = {1'b0, s4_n[55:3]} + {53'd0, rd_up};
  end

  logic               s5_s, s5_zero;
  logic signed [13:0] s5_e;
  logic [51:0]        s5_m;

  always_ff @(posedge clk) begin
    s5_s    <= s4_s;
    s5_zero <= s4_zero;
    if (rd_m[53]) begin            // significand overflow: adjust exponent
      s5_e <= s4_e + 14'sd1;
      s5_m <= rd_m[52:1];
    end else begin
      s5_e <= s4_e;
      s5_m <= rd_m[51:0];
    end
  end

  // ---------------- stage 6: range check and pack
  f64_t s6_y;
  always_ff @(posedge clk) begin
    if (s5_zero || s5_e <= 14'sd0) s6_y <= {s5_s, 63'd0};
    else if (s5_e >= 14'sd2047)    s6_y <= {s5_s, 11'h7FF, 52'd0};
    else                           s6_y <= {s5_s, s5_e[10:0], s5_m};
  end

  // ---------------- stage 7: output register
  always_ff @(posedge clk) y <= s6_y;

  logic [ADD_STAGES-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[ADD_STAGES-2:0], in_v};
  end
  assign out_v = vpipe[ADD_STAGES-1];

endmodule
