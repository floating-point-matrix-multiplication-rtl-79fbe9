// tb_table2_pe_sweep: square matrix products C <- A*B + C of order n = 10, 50
// and 100 on the eight smaller array configurations of the published
// prototype family, all with 64-column blocks: (PEs, block rows) = (1, 96),
// (2, 96), (3, 96), (4, 64), (5, 80), (6, 96), (7, 112), (8, 64). The 9-PE
// default is covered by tb_table2_square. One CCU per configuration runs in
// parallel, each with its own behavioural memory and exchange registers.
// Every word of C is compared bit for bit with an IEEE double reference. The
// hardware time of each call is turned into MFLOPS at 100 MHz (2n^3 flops)
// and must reach at least 95 % of the published sustained rate for that
// configuration, which also contains the software call overhead.
`timescale 1ns/1ps
module tb_table2_pe_sweep;
  import gemm_pkg::*;

  localparam int NCFG = 8;
  localparam int NT   = 3;
  localparam int MEMW = 32768;
  localparam int A0 = 16, B0 = 10240, C0 = 20480;
  localparam int CFG_P  [NCFG] = '{1, 2, 3, 4, 5, 6, 7, 8};
  localparam int CFG_SI [NCFG] = '{96, 96, 96, 64, 80, 96, 112, 64};
  localparam int SIZES  [NT]   = '{10, 50, 100};
  // published rates in MFLOPS for n = 10, 50, 100, one row per configuration
  localparam real PUB [NCFG][NT] = '{
    '{143.1, 192.0, 198.7}, '{222.7, 369.1, 394.7}, '{250.6, 523.7, 576.8},
    '{286.5, 662.5, 765.3}, '{332.2, 826.7, 969.6}, '{332.2, 901.2, 1102.9},
    '{332.2, 990.5, 1246.8}, '{332.2, 1099.3, 1424.4}};

  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;
  logic [NCFG-1:0] finished = '0;

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 8) - 4);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic start_op, end_op;
    logic [3:0] xreg_addr;
    logic [63:0] xreg_rd_dbus;
    logic mem_rd_en, mem_wr_en;
    logic [AW-1:0] mem_rd_addr, mem_wr_addr;
    logic [63:0] mem_rd_data, mem_wr_data;

    molen_ccu #(.NUM_PE(CFG_P[g]), .SI(CFG_SI[g]), .SJ(64)) dut (.*);

    logic [63:0] mem [MEMW];
    logic [63:0] xregs [11];
    always_ff @(posedge clk) begin
      if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr % MEMW];
      if (mem_wr_en) mem[mem_wr_addr % MEMW] <= mem_wr_data;
      xreg_rd_dbus <= xregs[xreg_addr];
    end

    // one square call of order n; returns its cycle count
    task automatic run_square(input int n, output longint ncyc);
      logic [63:0] cref [];
      longint t0;
      int bad = 0;
      cref = new[n * n];
      for (int i = 0; i < MEMW; i++) mem[i] = rnd_double();
      for (int j = 0; j < n; j++)
        for (int i = 0; i < n; i++) begin
          real acc;
          acc = $bitstoreal(mem[C0 + i + j*n]);
          for (int kk = 0; kk < n; kk++)
            acc = $bitstoreal(mem[A0 + i + kk*n]) * $bitstoreal(mem[B0 + kk + j*n]) + acc;
          cref[i + j*n] = $realtobits(acc);
        end
      xregs[0] = 64'(A0); xregs[1] = 64'(B0); xregs[2] = 64'(C0);
      xregs[3] = 64'(n);  xregs[4] = 64'(n);  xregs[5] = 64'(n);
      xregs[6] = 64'(n);  xregs[7] = 64'(n);  xregs[8] = 64'(n);
      xregs[9]  = $realtobits(1.0);
      xregs[10] = $realtobits(1.0);
      @(negedge clk) start_op = 1;
      @(negedge clk) start_op = 0;
      t0 = cycles;
      while (!end_op) @(negedge clk);
      ncyc = cycles - t0;
      for (int w = 0; w < n * n; w++) begin
        checks++;
        if (mem[C0 + w] !== cref[w]) begin
          failures++;
          bad++;
          if (bad < 4)
            $display("FAIL P=%0d n=%0d C[%0d]: got %h exp %h", CFG_P[g], n, w, mem[C0 + w], cref[w]);
        end
      end
    endtask

    initial begin
      start_op = 0;
      for (int i = 0; i < 11; i++) xregs[i] = '0;
      @(negedge clk);
      while (reset) @(negedge clk);
      repeat (2) @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        longint ncyc;
        real mflops;
        run_square(SIZES[t], ncyc);
        mflops = 2.0 * SIZES[t] * SIZES[t] * SIZES[t] / (ncyc * 10.0e-9) / 1.0e6;
        $display("P=%0d SI=%0d n=%0d: %0d cycles, %.1f MFLOPS at 100 MHz (published, with software: %.1f)",
                 CFG_P[g], CFG_SI[g], SIZES[t], ncyc, mflops, PUB[g][t]);
        checks++;
        if (mflops < 0.95 * PUB[g][t]) begin
          failures++;
          $display("FAIL: P=%0d n=%0d slower than published", CFG_P[g], SIZES[t]);
        end
      end
      finished[g] = 1'b1;
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    reset = 0;
    wait (&finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
