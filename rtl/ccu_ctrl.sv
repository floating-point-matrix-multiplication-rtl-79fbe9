// ccu_ctrl: CCU control logic and parameter registers of the GEMM unit.
//
// On start_op (the Molen execute instruction) it reads the eleven call
// parameters from the exchange registers, one per cycle, into its parameter
// registers, in the order a, b, c, lda, ldb, ldc, m, n, k, alpha, beta
// (exchange registers 0 to 10). It then starts the GEMM core and raises
// end_op when the core is done; end_op stays high until the next start_op.
// alpha and beta arrive as IEEE-754 doubles: the hardware supports
// alpha = +1/-1 and beta = 1/0 only, so alpha is reduced to its sign and beta
// to "is zero" (any other value is treated as the nearest supported one in
// that sense).
//
// Timing: xreg_addr is driven in cycle t, the register contents are expected
// on xreg_rd_dbus in cycle t+1. Reading takes 13 cycles, then core_start is a
// one-cycle pulse. Register order, exchange-register timing and the
// alpha/beta encoding are this design's choices; the register list is the
// document's.
module ccu_ctrl
  import gemm_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start_op,
  output logic         end_op,
  output logic [3:0]   xreg_addr,
  input  logic [63:0]  xreg_rd_dbus,
  output logic         core_start,
  output gemm_params_t params,
  input  logic         core_done
);

  localparam int unsigned NPARAM = 11;

  typedef enum logic [2:0] {C_IDLE, C_READ, C_LAND, C_START, C_WAIT} state_e;
  state_e state;

  logic [3:0]  idx;        // register being addressed
  logic        rd_v;       // xreg_rd_dbus holds register rd_idx
  logic [3:0]  rd_idx;
  logic [63:0] regs [NPARAM];

  assign xreg_addr  = idx;
  assign core_start = (state == C_START);

  always_comb begin
    params.a         = AW'(regs[0]);
    params.b         = AW'(regs[1]);
    params.c         = AW'(regs[2]);
    params.lda       = DIM_W'(regs[3]);
    params.ldb       = DIM_W'(regs[4]);
    params.ldc       = DIM_W'(regs[5]);
    params.m         = DIM_W'(regs[6]);
    params.n         = DIM_W'(regs[7]);
    params.k         = DIM_W'(regs[8]);
    params.alpha_neg = regs[9][63];
    params.beta_zero = (regs[10][62:0] == 63'd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      end_op <= 1'b0;
      idx    <= '0;
      rd_v   <= 1'b0;
      for (int i = 0; i < NPARAM; i++) regs[i] <= '0;
    end else begin
      rd_v   <= (state == C_READ);
      rd_idx <= idx;
      if (rd_v) regs[rd_idx] <= xreg_rd_dbus;
      unique case (state)
        C_IDLE: if (start_op) begin
          end_op <= 1'b0;
          idx    <= '0;
          state  <= C_READ;
        end
        C_READ: begin
          if (idx == 4'(NPARAM - 1)) state <= C_LAND;
          else                       idx   <= idx + 1'b1;
        end
        C_LAND:  state <= C_START;         // last register is written this cycle
        C_START: state <= C_WAIT;
        C_WAIT: if (core_done) begin
          end_op <= 1'b1;
          state  <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
