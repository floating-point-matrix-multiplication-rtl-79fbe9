// fp64_mac: pipelined double-precision multiply-add, y = c + a*b, 11 cycles.
//
// A four-stage multiplier (fp64_mul) feeds a seven-stage adder (fp64_add);
// the product is rounded before the addition, so this is a multiply-then-add
// unit, not a fused one. The addend c is presented together with a and b and
// is delayed inside by the multiplier depth, so the caller gives all three
// operands in the same cycle and receives the sum eleven cycles later.
// A new operation may start every cycle. The latency of eleven cycles is the
// document's; the split into 4 + 7 stages is taken from its adder depth.
module fp64_mac
  import gemm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_v,
  input  f64_t  a,
  input  f64_t  b,
  input  f64_t  c,
  output logic  out_v,
  output f64_t  y
);

  logic p_v;
  f64_t p;
  f64_t c_dly [MUL_STAGES];

  fp64_mul u_mul (.clk, .rst, .in_v, .a, .b, .out_v(p_v), .y(p));

  always_ff @(posedge clk) begin
    c_dly[0] <= c;
    for (int i = 1; i < MUL_STAGES; i++) c_dly[i] <= c_dly[i-1];
  end

  fp64_add u_add (.clk, .rst, .in_v(p_v), .a(p), .b(c_dly[MUL_STAGES-1]), .out_v, .y);

endmodule
