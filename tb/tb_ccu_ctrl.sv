// tb_ccu_ctrl: the CCU control logic with a model of the exchange registers
// (one-cycle read latency) and of the GEMM core (done some cycles after
// start). For several calls it checks that all eleven parameters arrive in
// the right fields (alpha reduced to its sign, beta to "is zero"), that the
// core is started exactly once, 13 cycles after start_op, only when all
// parameters are in place, and that end_op rises after the core is done and
// stays high until the next start_op.
`timescale 1ns/1ps
module tb_ccu_ctrl;
  import gemm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start_op, end_op, core_start, core_done;
  logic [3:0] xreg_addr;
  logic [63:0] xreg_rd_dbus;
  gemm_params_t params;
  ccu_ctrl dut (.*);

  logic [63:0] xr [16];
  always_ff @(posedge clk) xreg_rd_dbus <= xr[xreg_addr];

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic call(bit an, bit bz, int busy_cycles);
    gemm_params_t e;
    longint t0;
    int starts = 0;
    for (int i = 0; i < 9; i++) xr[i] = {32'd0, $urandom};
    xr[9]  = an ? $realtobits(-1.0) : $realtobits(1.0);
    xr[10] = bz ? (($urandom_range(0, 1) != 0) ? 64'h8000000000000000 : 64'd0) : $realtobits(1.0);
    e = '{a: xr[0][AW-1:0], b: xr[1][AW-1:0], c: xr[2][AW-1:0], lda: xr[3][31:0], ldb: xr[4][31:0],
          ldc: xr[5][31:0], m: xr[6][31:0], n: xr[7][31:0], k: xr[8][31:0], alpha_neg: an, beta_zero: bz};
    core_done = 1;              // still high from the previous operation
    @(negedge clk) start_op = 1;
    t0 = cyc;
    @(negedge clk) begin
      start_op = 0;
      checks++;
      if (end_op) begin failures++; $display("FAIL: end_op not cleared by start_op"); end
    end
    while (!core_start) begin
      @(negedge clk);
      if (cyc - t0 > 40) break;
    end
    checks++;
    if (!core_start || cyc - t0 != 13 || params !== e) begin
      failures++;
      $display("FAIL: core_start after %0d cycles, params %p exp %p", cyc - t0, params, e);
    end
    @(negedge clk) core_done = 0;
    checks++;
    if (core_start) begin failures++; $display("FAIL: core_start longer than one cycle"); end
    repeat (busy_cycles) begin
      @(negedge clk);
      if (core_start) starts++;
      if (end_op) begin failures++; $display("FAIL: end_op early"); end
    end
    core_done = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (!end_op || starts != 0) begin failures++; $display("FAIL: end_op missing"); end
    repeat (5) @(negedge clk);
    checks++;
    if (!end_op) begin failures++; $display("FAIL: end_op not held"); end
  endtask

  initial begin
    start_op = 0; core_done = 0;
    for (int i = 0; i < 16; i++) xr[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    call(0, 0, 20);
    call(1, 1, 5);
    call(1, 0, 33);
    call(0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
