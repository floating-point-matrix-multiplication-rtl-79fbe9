// tb_table2_square: square matrix products C <- A*B + C of order n = 10, 20,
// 30, 50, 64, 100 and 300 on the CCU at its default size (9 PEs, 72 x 64 blocks),
// the 9-PE column of the published measurements. Every word of C is compared
// bit for bit with an IEEE double reference. For each n the hardware time is
// turned into MFLOPS at 100 MHz (2n^3 flops) and compared with the published
// sustained rate, which also contains the software call overhead: the
// hardware alone must reach at least 95 % of it.
`timescale 1ns/1ps
module tb_table2_square;
  import gemm_pkg::*;

  localparam int NUM_PE = 9, SI = 72, SJ = 64;
  localparam int MEMW = 524288;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start_op, end_op;
  logic [3:0] xreg_addr;
  logic [63:0] xreg_rd_dbus;
  logic mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [63:0] mem_rd_data, mem_wr_data;

  molen_ccu dut (.*);

  // ---------------- behavioural memory and exchange registers
  logic [63:0] mem [MEMW];
  logic [63:0] xregs [11];
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr % MEMW];
    if (mem_wr_en) mem[mem_wr_addr % MEMW] <= mem_wr_data;
    xreg_rd_dbus <= xregs[xreg_addr];
  end

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  longint last_cycles;

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 8) - 4);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  // ---------------- one dgemm call, checked against a reference
  task automatic run_gemm(int m, int n, int k, int lda, int ldb, int ldc,
                          bit alpha_neg, bit beta_zero);
    int a = 16, b = 131072, c = 262144;
    logic [63:0] cref [];
    longint t0;
    int f0 = failures;
    cref = new[ldc * (n > 0 ? n : 1) + 8];
    for (int i = 0; i < MEMW; i++) mem[i] = rnd_double();
    // reference
    for (int j = 0; j < n; j++)
      for (int i = 0; i < m; i++) begin
        real acc, pr, av;
        acc = beta_zero ? 0.0 : $bitstoreal(mem[c + i + j*ldc]);
        for (int kk = 0; kk < k; kk++) begin
          av = $bitstoreal(mem[a + i + kk*lda]);
          if (alpha_neg) av = -av;
          pr = av * $bitstoreal(mem[b + kk + j*ldb]);
          acc = pr + acc;
        end
        cref[i + j*ldc] = $realtobits(acc);
      end
    for (int j = 0; j < n; j++)
      for (int i = m; i < ldc; i++) cref[i + j*ldc] = mem[c + i + j*ldc];
    xregs[0] = 64'(a);  xregs[1] = 64'(b);  xregs[2] = 64'(c);
    xregs[3] = 64'(lda); xregs[4] = 64'(ldb); xregs[5] = 64'(ldc);
    xregs[6] = 64'(m);  xregs[7] = 64'(n);  xregs[8] = 64'(k);
    xregs[9]  = alpha_neg ? $realtobits(-1.0) : $realtobits(1.0);
    xregs[10] = beta_zero ? $realtobits(0.0)  : $realtobits(1.0);
    @(negedge clk) start_op = 1;
    @(negedge clk) start_op = 0;
    t0 = cycles;
    while (!end_op) @(negedge clk);
    last_cycles = cycles - t0;
    $display("gemm m=%0d n=%0d k=%0d alpha_neg=%0d beta_zero=%0d: %0d cycles",
             m, n, k, alpha_neg, beta_zero, cycles - t0);
    for (int j = 0; j < n; j++)
      for (int i = 0; i < ldc; i++) begin
        checks++;
        if (mem[c + i + j*ldc] !== cref[i + j*ldc]) begin
          failures++;
          if (failures - f0 < 6)
            $display("FAIL C(%0d,%0d): got %h exp %h", i, j, mem[c + i + j*ldc], cref[i + j*ldc]);
        end
      end
    if (failures != f0) $display("  %0d wrong words", failures - f0);
  endtask

  initial begin
    start_op = 0;
    for (int i = 0; i < 11; i++) xregs[i] = '0;
    repeat (5) @(negedge clk);
    reset = 0;
    repeat (2) @(negedge clk);
    begin
      int  ns [7]  = '{10, 20, 30, 50, 64, 100, 300};
      // published 9-PE rates for n = 10, 20, 30, 50, 60 (for 64), 100 and 300
      real pub [7] = '{330.0, 722.7, 959.8, 1235.0, 1323.0, 1533.7, 1758.0};
      for (int t = 0; t < 7; t++) begin
        real mflops;
        run_gemm(ns[t], ns[t], ns[t], ns[t], ns[t], ns[t], 0, 0);
        mflops = 2.0 * ns[t] * ns[t] * ns[t] / (last_cycles * 10.0e-9) / 1.0e6;
        $display("n=%0d: %0d cycles, %.1f MFLOPS at 100 MHz (published, with software: %.1f)",
                 ns[t], last_cycles, mflops, pub[t]);
        checks++;
        if (mflops < 0.95 * pub[t]) begin failures++; $display("FAIL: slower than published"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
