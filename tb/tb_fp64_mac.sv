// tb_fp64_mac: self-checking test of the 11-cycle multiply-add y = c + a*b.
// Random operands enter one per cycle (with gaps); each result is compared
// bit for bit with round(round(a*b) + c) computed in IEEE double arithmetic,
// and must appear exactly 11 cycles after its operands. Zero operands and
// products that cancel the addend are included.
`timescale 1ns/1ps
module tb_fp64_mac;
  import gemm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic in_v, out_v;
  f64_t a, b, c, y;
  fp64_mac dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  localparam int N = 10000, LAT = 11;
  f64_t exp_q [$];
  int   t_in  [$];

  function automatic f64_t rnd();
    f64_t v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 40) - 20);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    if ($urandom_range(0, 29) == 0) v[62:0] = '0;
    return v;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_v) begin
      f64_t e;
      int   t;
      checks++;
      e = exp_q.pop_front();
      t = t_in.pop_front();
      if (y !== e || cyc - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL: got %h exp %h latency %0d", y, e, cyc - t);
      end
    end
  end

  initial begin
    in_v = 0; a = '0; b = '0; c = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      real p;
      @(negedge clk);
      in_v = ($urandom_range(0, 7) != 0);
      a = rnd(); b = rnd(); c = rnd();
      p = $bitstoreal(a) * $bitstoreal(b);
      if ($urandom_range(0, 9) == 0) c = $realtobits(-p);   // exact cancellation
      if (in_v) begin
        exp_q.push_back($realtobits(p + $bitstoreal(c)));
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
