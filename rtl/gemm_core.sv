// gemm_core: the GEMM core, C <- alpha*A*B + beta*C in IEEE-754 double
// precision, for alpha in {-1, +1} and beta in {0, 1}.
//
// A gemm_controller drives a linear array of NUM_PE processing elements.
// Commands enter PE 0 and ripple one PE per cycle toward PE NUM_PE-1; read
// data for the store path ripples the same way and leaves the last PE toward
// the controller's write FIFO. Blocks of C are SI x SJ words; each PE holds
// SI/NUM_PE rows of a block. Peak rate is one multiply-add (two flops) per PE
// per cycle.
//
// Interface: start (one cycle) with params, done (level, until next start),
// one memory port with a read of RD_LAT cycles latency and a write, both
// 64-bit words at word addresses. The defaults (9 PEs, 72 x 64 blocks) are
// the document's main configuration.
module gemm_core
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned SI     = 72,
  parameter int unsigned SJ     = 64,
  parameter int unsigned RD_LAT = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  gemm_params_t  params,
  output logic          done,
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  f64_t          mem_rd_data,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr,
  output f64_t          mem_wr_data
);

  localparam int unsigned ROWS = SI / NUM_PE;

  pe_cmd_t cmd [NUM_PE+1];
  pe_rd_t  rd  [NUM_PE+1];

  gemm_controller #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ), .RD_LAT(RD_LAT)) u_ctrl (
    .clk, .rst, .start, .params, .done,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .pe_cmd(cmd[0]), .pe_rd(rd[NUM_PE])
  );

  assign rd[0] = '0;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    gemm_pe #(.PE_ID(p), .ROWS(ROWS), .SJ(SJ)) u_pe (
      .clk, .rst,
      .cmd_in(cmd[p]), .cmd_out(cmd[p+1]),
      .rd_in(rd[p]),   .rd_out(rd[p+1])
    );
  end

  if (SI % NUM_PE != 0) begin : g_bad_si
    $error("SI must be a multiple of NUM_PE");
  end

endmodule
