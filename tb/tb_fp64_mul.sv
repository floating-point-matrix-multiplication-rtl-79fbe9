// tb_fp64_mul: self-checking test of the double-precision multiplier.
// Random operands (normal numbers with exponents chosen so that results stay
// in the normal range, plus zeros of both signs and exact cancellations) are
// fed one per cycle (many with short significands, so that exact ties occur);
// each result must match, bit for bit, the IEEE double
// result computed by the simulator's own real arithmetic (round to nearest
// even; a result below the normal range is expected as a signed zero), and must appear exactly 4 cycles after its operands.
`timescale 1ns/1ps
module tb_fp64_mul;
  import gemm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_v, out_v;
  f64_t a, b, y;
  fp64_mul dut (.*);

  int checks = 0, failures = 0;
  localparam int N = 20000, LAT = 4;
  f64_t exp_q [$];
  int   t_in  [$];
  int   cyc = 0;

  function automatic f64_t rnd(int spread);
    f64_t v;
    int r = $urandom_range(0, 99);
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 2*spread) - spread);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    if (r < 3) v[62:0] = '0;                    // signed zero
    else if (r < 6) v[51:0] = '0;               // power of two
    else if (r < 9) v[51:0] = 52'hF_FFFF_FFFF_FFFF; // rounding carries
    else if (r < 30) v[25:0] = '0;              // short significands: exact ties
    return v;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_v) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        f64_t e;
        int   t;
        e = exp_q.pop_front();
        t = t_in.pop_front();
        if (y !== e || cyc - t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h exp %h latency %0d", y, e, cyc - t);
        end
      end
    end
  end

  initial begin
    in_v = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_v = ($urandom_range(0, 9) != 0);
      a = rnd(i < N/2 ? 8 : 300);
      b = rnd(i < N/2 ? 8 : 300);
      if ("mul" == "add" && $urandom_range(0, 9) == 0) b = {~a[63], a[62:0]};         // cancellation
      if ("mul" == "add" && $urandom_range(0, 9) == 0) b = {~a[63], a[62:2], 2'($urandom)}; // near cancellation
      if (in_v) begin
        f64_t r;
        f64_t fa, fb;
        // denormal operands count as zeros of the same sign
        fa = (a[62:52] == 11'd0) ? {a[63], 63'd0} : a;
        fb = (b[62:52] == 11'd0) ? {b[63], 63'd0} : b;
        r = $realtobits($bitstoreal(fa) * $bitstoreal(fb));
        // results below the normal range are flushed to a zero of the same sign
        if (r[62:52] == 11'd0) r[51:0] = '0;
        exp_q.push_back(r);
        t_in.push_back(cyc);
      end
    end
    @(negedge clk) in_v = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
