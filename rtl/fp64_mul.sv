// fp64_mul: pipelined IEEE-754 double-precision multiplier, 4 cycles.
//
// Forms the 53x53-bit significand product, normalises it by at most one bit
// and rounds to nearest, ties to even. When rounding carries out of the
// significand the exponent is incremented. Zero is supported; a denormal
// operand is read as zero and a result below the normal range is flushed to
// a signed zero. A result above the range becomes infinity. Infinity and NaN
// operands are not given any special meaning (the document does not cover them).
//
// Stages: 1 unpack, 2 significand product, 3 normalise and round, 4 pack.
// Interface: in_v/a/b in cycle t give out_v/y in cycle t+4 (registered outputs);
// a new operation may enter every cycle. The four-stage depth follows the
// eleven-cycle multiply-add minus its seven adder stages.
module fp64_mul
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

  // ---------------- stage 1: unpack
  logic              s1_s, s1_zero;
  logic signed [13:0] s1_e;
  logic [52:0]       s1_fa, s1_fb;

  always_ff @(posedge clk) begin
    s1_s    <= a[63] ^ b[63];
    s1_zero <= (a[62:52] == 11'd0) || (b[62:52] == 11'd0);
    s1_e    <= $signed({3'b0, a[62:52]}) + $signed({3'b0, b[62:52]}) - 14'sd1023;
    s1_fa   <= {1'b1, a[51:0]};
    s1_fb   <= {1'b1, b[51:0]};
  end

  // ---------------- stage 2: significand product
  logic               s2_s, s2_zero;
  logic signed [13:0] s2_e;
  logic [105:0]       s2_p;

  always_ff @(posedge clk) begin
    s2_s    <= s1_s;
    s2_zero <= s1_zero;
    s2_e    <= s1_e;
    s2_p    <= s1_fa * s1_fb;
  end

  // ---------------- stage 3: normalise and round
  logic [52:0]        n_m;
  logic               n_g, n_st, n_up;
  logic signed [13:0] n_e;
  logic [53:0]        r_m;

  always_comb begin
    if (s2_p[105]) begin
      n_m  = s2_p[105:53];
      n_g  = s2_p[52];
      n_st = |s2_p[51:0];
      n_e  = s2_e + 14'sd1;
    end else begin
      n_m  = s2_p[104:52];
      n_g  = s2_p[51];
      n_st = |s2_p[50:0];
      n_e  = s2_e;
    end
    n_up = n_g & (n_st | n_m[0]);
    r_m  = {1'b0, n_m} + {53'd0, n_up};
  end

  logic               s3_s, s3_zero;
  logic signed [13:0] s3_e;
  logic [51:0]        s3_m;

  always_ff @(posedge clk) begin
    s3_s    <= s2_s;
    s3_zero <= s2_zero;
    if (r_m[53]) begin           // rounding overflowed the significand
      s3_e <= n_e + 14'sd1;
      s3_m <= r_m[52:1];
    end else begin
      s3_e <= n_e;
      s3_m <= r_m[51:0];
    end
  end

  // ---------------- stage 4: pack, range checks
  always_ff @(posedge clk) begin
    if (s3_zero || s3_e <= 14'sd0) y <= {s3_s, 63'd0};
    else if (s3_e >= 14'sd2047)    y <= {s3_s, 11'h7FF, 52'd0};
    else                           y <= {s3_s, s3_e[10:0], s3_m};
  end

  // valid pipeline
  logic [MUL_STAGES-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[MUL_STAGES-2:0], in_v};
  end
  assign out_v = vpipe[MUL_STAGES-1];

endmodule
