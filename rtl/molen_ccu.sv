// molen_ccu: double-precision matrix multiplier as a custom computing unit
// (CCU) of a Molen-style polymorphic processor. Top of the design.
//
// The host calls C <- alpha*A*B + beta*C like the BLAS dgemm routine: it
// writes the eleven parameters (a, b, c, lda, ldb, ldc, m, n, k, alpha, beta)
// into exchange registers and issues start_op. The CCU control logic copies
// them into its registers and starts the GEMM core, which works directly on
// the shared system memory through one 64-bit port. When the last block of C
// is written back, end_op rises.
//
// Defaults are the document's main configuration: 9 PEs, blocks of 72 x 64,
// 11-cycle multiply-add, peak 18 flops per cycle (1.8 GFLOPS at 100 MHz).
// Matrices are column-major, addresses and leading dimensions count 64-bit
// words. mem_rd_data must answer RD_LAT cycles after mem_rd_en; a write is
// done in the cycle mem_wr_en is high. A read and a write never happen in the
// same cycle.
module molen_ccu
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned SI     = 72,
  parameter int unsigned SJ     = 64,
  parameter int unsigned RD_LAT = 1
) (
  input  logic          clk,
  input  logic          reset,
  // Molen CCU control
  input  logic          start_op,
  output logic          end_op,
  output logic [3:0]    xreg_addr,
  input  logic [63:0]   xreg_rd_dbus,
  // shared system memory
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  logic [63:0]   mem_rd_data,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr,
  output logic [63:0]   mem_wr_data
);

  logic         core_start, core_done;
  gemm_params_t params;

  ccu_ctrl u_ctrl (
    .clk, .rst(reset), .start_op, .end_op, .xreg_addr, .xreg_rd_dbus,
    .core_start, .params, .core_done
  );

  gemm_core #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ), .RD_LAT(RD_LAT)) u_core (
    .clk, .rst(reset), .start(core_start), .params, .done(core_done),
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data
  );

endmodule
