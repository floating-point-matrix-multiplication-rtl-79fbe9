// tb_molen_ccu_full: one complete dgemm operation, and a second one with
// partial edge blocks, on the CCU at its default size (9 PEs, 72 x 64 blocks).
// Every word of C is compared bit for bit with an IEEE double reference that
// accumulates in the same order as the hardware. The first call, 144 x 40
// times 40 x 128, uses only full blocks and satisfies the no-stall conditions
// iS >= iP + S and k(iS - iP - S) >= 2iPS (i = 8 rows per PE, P = 9, S = 64);
// its cycle count must lie between the pure compute time mkn/P and the
// predicted total mkn/P + 2iPS + iP plus a small fixed start/finish allowance.
`timescale 1ns/1ps
module tb_molen_ccu_full;
  import gemm_pkg::*;

  localparam int NUM_PE = 9, SI = 72, SJ = 64;
  localparam int MEMW = 65536;

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
    int a = 16, b = 8192, c = 16384;
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
    run_gemm(144, 128, 40, 144, 40, 144, 0, 0);
    begin
      // predicted time from the document's model, equation (5)
      longint ideal, t5;
      ideal = longint'(144) * 40 * 128 / NUM_PE;
      t5    = ideal + 2 * 8 * NUM_PE * SJ + 8 * NUM_PE;
      checks++;
      if (last_cycles < ideal || last_cycles > t5 + t5 / 50 + 200) begin
        failures++;
        $display("FAIL: %0d cycles, expected between %0d and about %0d", last_cycles, ideal, t5);
      end else
        $display("rate: %0d cycles, compute-only %0d, model %0d, %.1f%% of peak",
                 last_cycles, ideal, t5, 100.0 * ideal / last_cycles);
    end
    run_gemm(80, 70, 17, 81, 18, 83, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
