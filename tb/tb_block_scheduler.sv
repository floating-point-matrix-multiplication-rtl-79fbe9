// tb_block_scheduler: checks the block descriptors for several matrix shapes
// (exact multiples of the block size, ragged edges, an edge block of exactly
// NUM_PE rows, single rows, m or n zero)
// against descriptors computed independently with multiplications: for block
// (ib, jb), A' starts at a + ib*SI, B' at b + jb*SJ*ldb, C' at
// c + ib*SI + jb*SJ*ldc; rows and columns are clipped at the matrix edge;
// ieff = ceil(rows / NUM_PE); buffer sets alternate; the last block is
// flagged. desc_rdy is randomly withheld to test the handshake.
`timescale 1ns/1ps
module tb_block_scheduler;
  import gemm_pkg::*;
  localparam int NUM_PE = 3, SI = 6, SJ = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy, empty, desc_v, desc_rdy;
  gemm_params_t params;
  blk_desc_t desc;
  block_scheduler #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ)) dut (.*);

  int checks = 0, failures = 0;

  task automatic run(int m, int n, int lda, int ldb, int ldc);
    int nb = 0, nblocks, bank = 0;
    bit saw_empty = 0;
    params = '{a: 100, b: 5000, c: 20000, lda: lda, ldb: ldb, ldc: ldc,
               m: m, n: n, k: 3, alpha_neg: 0, beta_zero: 0};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    nblocks = ((m + SI - 1) / SI) * ((n + SJ - 1) / SJ);
    for (int jb = 0; jb * SJ < n; jb++)
      for (int ib = 0; ib * SI < m; ib++) begin
        blk_desc_t e;
        int rows, cols;
        rows = (m - ib*SI < SI) ? m - ib*SI : SI;
        cols = (n - jb*SJ < SJ) ? n - jb*SJ : SJ;
        e.a_addr = AW'(100 + ib*SI);
        e.b_addr = AW'(5000 + jb*SJ*ldb);
        e.c_addr = AW'(20000 + ib*SI + jb*SJ*ldc);
        e.rows = rows; e.cols = cols;
        e.ieff = Q_W'((rows + NUM_PE - 1) / NUM_PE);
        e.bank = 1'(bank); bank ^= 1;
        e.last = (++nb == nblocks);
        // wait for the descriptor, with random back-pressure
        forever begin
          desc_rdy = ($urandom_range(0, 2) != 0);
          @(posedge clk);
          if (desc_v && desc_rdy) break;
          @(negedge clk);
        end
        checks++;
        if (desc !== e) begin
          failures++;
          $display("FAIL block (%0d,%0d): got %p exp %p", ib, jb, desc, e);
        end
        @(negedge clk);
      end
    desc_rdy = 0;
    repeat (3) begin
      if (empty) saw_empty = 1;
      @(negedge clk);
    end
    checks++;
    if (desc_v || busy || (saw_empty != (nblocks == 0))) begin
      failures++; $display("FAIL: state after m=%0d n=%0d", m, n);
    end
  endtask

  initial begin
    start = 0; desc_rdy = 0; params = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(12, 8, 12, 20, 12);
    run(13, 9, 15, 7, 17);
    run(1, 1, 1, 1, 1);
    run(5, 11, 5, 3, 6);
    run(9, 5, 9, 5, 10);
    run(0, 4, 1, 1, 1);
    run(7, 0, 7, 1, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
