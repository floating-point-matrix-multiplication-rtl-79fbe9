// tb_gemm_controller: the GEMM controller (scheduler, load, exec and store
// units, memory multiplexer, state machine) driving a behavioural model of the
// PE array, at reduced size (3 PEs, 6 x 4 blocks), with a behavioural memory
// of read latency 2. Several operations with edge blocks, alpha = -1 and
// beta = 0 are run; C is compared bit for bit with an IEEE double reference,
// words next to C must be unchanged, done must rise, and the model must see
// no buffer hazard.
`timescale 1ns/1ps
module tb_gemm_controller;
  import gemm_pkg::*;
  localparam int NUM_PE = 3, SI = 6, SJ = 4, RD_LAT = 2, MEMW = 8192;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, done;
  gemm_params_t params;
  logic mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  f64_t mem_rd_data, mem_wr_data;
  pe_cmd_t pe_cmd;
  pe_rd_t  pe_rd;

  gemm_controller #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ), .RD_LAT(RD_LAT)) dut (.*);
  pe_array_model #(.NUM_PE(NUM_PE), .ROWS(SI / NUM_PE), .SJ(SJ)) u_pes (.clk, .cmd(pe_cmd), .rd(pe_rd));

  logic [63:0] mem [MEMW];
  logic [63:0] rpipe [RD_LAT];
  always_ff @(posedge clk) begin
    rpipe[0] <= mem[mem_rd_addr % MEMW];
    for (int i = 1; i < RD_LAT; i++) rpipe[i] <= rpipe[i-1];
    if (mem_wr_en) mem[mem_wr_addr % MEMW] <= mem_wr_data;
  end
  assign mem_rd_data = rpipe[RD_LAT-1];

  int checks = 0, failures = 0;

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 8) - 4);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic run_gemm(int m, int n, int k, int lda, int ldb, int ldc, bit an, bit bz);
    int a = 8, b = 2048, c = 4096;
    logic [63:0] cref [];
    cref = new[ldc * n];
    for (int i = 0; i < MEMW; i++) mem[i] = rnd_double();
    for (int j = 0; j < n; j++)
      for (int i = 0; i < ldc; i++) begin
        real acc, av, pr;
        if (i >= m) begin cref[i + j*ldc] = mem[c + i + j*ldc]; continue; end
        acc = bz ? 0.0 : $bitstoreal(mem[c + i + j*ldc]);
        for (int kk = 0; kk < k; kk++) begin
          av = $bitstoreal(mem[a + i + kk*lda]);
          if (an) av = -av;
          pr = av * $bitstoreal(mem[b + kk + j*ldb]);
          acc = pr + acc;
        end
        cref[i + j*ldc] = $realtobits(acc);
      end
    params = '{a: AW'(a), b: AW'(b), c: AW'(c), lda: lda, ldb: ldb, ldc: ldc,
               m: m, n: n, k: k, alpha_neg: an, beta_zero: bz};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    for (int j = 0; j < n; j++)
      for (int i = 0; i < ldc; i++) begin
        checks++;
        if (mem[c + i + j*ldc] !== cref[i + j*ldc]) begin
          failures++;
          if (failures < 8) $display("FAIL C(%0d,%0d) got %h exp %h", i, j, mem[c + i + j*ldc], cref[i + j*ldc]);
        end
      end
  endtask

  initial begin
    start = 0; params = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    run_gemm(11, 7, 6, 12, 7, 13, 0, 0);
    run_gemm(6, 4, 9, 6, 9, 6, 1, 1);
    run_gemm(2, 3, 1, 2, 1, 2, 1, 0);
    run_gemm(14, 9, 4, 14, 4, 15, 0, 1);
    checks++;
    if (u_pes.hazards != 0) begin failures++; $display("FAIL: %0d buffer hazards", u_pes.hazards); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
