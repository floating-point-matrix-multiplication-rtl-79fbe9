// tb_molen_ccu_lat3: the end-to-end calls of tb_molen_ccu (3 PEs, 6 x 4
// blocks, odd sizes, alpha = -1, beta = 0, 1x1x1 and empty calls) against a
// slower system memory that answers three cycles after a read (RD_LAT = 3),
// so that several tagged reads of the load and exec units are in flight at
// once. Every word of C and the words around it are compared bit for bit
// with an IEEE double reference, and the same mechanism counters must all be
// non-zero.
`timescale 1ns/1ps
module tb_molen_ccu_lat3;
  import gemm_pkg::*;

  localparam int NUM_PE = 3, SI = 6, SJ = 4;
  localparam int MEMW = 8192;

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic start_op, end_op;
  logic [3:0] xreg_addr;
  logic [63:0] xreg_rd_dbus;
  logic mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [63:0] mem_rd_data, mem_wr_data;

  molen_ccu #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ), .RD_LAT(3)) dut (.*);

  // ---------------- behavioural memory and exchange registers
  logic [63:0] mem [MEMW];
  logic [63:0] rd1, rd2;   // two extra read stages: data three cycles after the request
  logic [63:0] xregs [11];
  always_ff @(posedge clk) begin
    if (mem_rd_en) rd1 <= mem[mem_rd_addr % MEMW];
    rd2 <= rd1;
    mem_rd_data <= rd2;
    if (mem_wr_en) mem[mem_wr_addr % MEMW] <= mem_wr_data;
    xreg_rd_dbus <= xregs[xreg_addr];
  end

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // ---------------- mechanism counters
  int n_abank_switch, n_cbank_use[2], n_load_overlap, n_store_overlap, n_stall,
      n_pad, n_edge, n_contention, n_zero_load, n_alpha_neg, n_empty;
  always @(posedge clk) if (!reset) begin
    if (dut.u_core.u_ctrl.u_exec.iter_end) n_abank_switch++;
    if (dut.u_core.u_ctrl.u_exec.cq_pop) n_cbank_use[dut.u_core.u_ctrl.u_exec.cq_dout.bank]++;
    if (dut.u_core.u_ctrl.ld_cmd.c_we && dut.u_core.u_ctrl.ex_cmd.mac_v) n_load_overlap++;
    if (dut.u_core.u_ctrl.st_cmd.r_v && dut.u_core.u_ctrl.ex_cmd.mac_v) n_store_overlap++;
    if (dut.u_core.u_ctrl.u_exec.cst == 2'd1 && dut.u_core.u_ctrl.u_exec.iter_begin == 1'b0) n_stall++;
    if (dut.u_core.u_ctrl.u_exec.stall) n_stall++;
    if (dut.u_core.u_ctrl.u_exec.slot && !dut.u_core.u_ctrl.u_exec.need_b) n_pad++;
    if (dut.u_core.u_ctrl.sch_v && dut.u_core.u_ctrl.sch_rdy &&
        (dut.u_core.u_ctrl.sch_d.rows != SI || dut.u_core.u_ctrl.sch_d.cols != SJ)) n_edge++;
    if ((dut.u_core.u_ctrl.ld_req && !dut.u_core.u_ctrl.ld_gnt) ||
        (dut.u_core.u_ctrl.st_req && !dut.u_core.u_ctrl.st_gnt)) n_contention++;
    if (dut.u_core.u_ctrl.ld_cmd.c_zero) n_zero_load++;
    if (dut.u_core.u_ctrl.ex_cmd.a_we && dut.u_core.u_ctrl.p.alpha_neg) n_alpha_neg++;
    if (dut.u_core.u_ctrl.sch_empty) n_empty++;
  end

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
    int a = 16, b = 2048, c = 4096;
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
    run_gemm(13, 9, 5, 15, 6, 14, 0, 0);
    run_gemm(7, 5, 11, 7, 12, 8, 1, 1);
    run_gemm(1, 1, 1, 1, 1, 1, 0, 0);
    run_gemm(6, 8, 3, 6, 3, 6, 1, 0);
    run_gemm(12, 4, 20, 12, 20, 12, 0, 0);
    // empty call: m = 0 must finish without touching memory
    run_gemm(0, 3, 2, 1, 2, 1, 0, 0);
    checks++;
    if (n_abank_switch == 0)  begin failures++; $display("FAIL: A buffer sets never switched"); end
    if (n_cbank_use[0] == 0 || n_cbank_use[1] == 0) begin failures++; $display("FAIL: a C buffer set unused"); end
    if (n_load_overlap == 0)  begin failures++; $display("FAIL: load never overlapped computation"); end
    if (n_store_overlap == 0) begin failures++; $display("FAIL: store never overlapped computation"); end
    if (n_stall == 0)         begin failures++; $display("FAIL: PEs never stalled"); end
    if (n_pad == 0)           begin failures++; $display("FAIL: no padding slot"); end
    if (n_edge == 0)          begin failures++; $display("FAIL: no edge block"); end
    if (n_contention == 0)    begin failures++; $display("FAIL: no memory contention"); end
    if (n_zero_load == 0)     begin failures++; $display("FAIL: beta=0 never used"); end
    if (n_alpha_neg == 0)     begin failures++; $display("FAIL: alpha=-1 never used"); end
    if (n_empty == 0)         begin failures++; $display("FAIL: empty call never seen"); end
    $display("mechanisms: abank_switch=%0d cbank0=%0d cbank1=%0d load_overlap=%0d store_overlap=%0d stall=%0d pad=%0d edge=%0d contention=%0d zero_load=%0d alpha_neg=%0d empty=%0d",
             n_abank_switch, n_cbank_use[0], n_cbank_use[1], n_load_overlap, n_store_overlap,
             n_stall, n_pad, n_edge, n_contention, n_zero_load, n_alpha_neg, n_empty);
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
