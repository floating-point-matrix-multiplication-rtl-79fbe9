// gemm_controller: the GEMM controller that drives the linear PE array.
//
// It is built from five units connected as a pipeline of block descriptors:
// block scheduler -> load unit -> exec unit -> store unit. While the PEs
// compute block b in one C buffer set, the store unit empties the other set
// (block b-1) and the load unit refills it (block b+1); the exec unit fetches
// the next column of A' during computation (see the unit headers). The
// memory multiplexer shares the single memory port among exec, store and load
// units. The command fields that the three units drive into the PE array are
// disjoint (or never active together), so they are merged by a bitwise OR.
//
// A small state machine tracks the operation: IDLE until start, RUN until the
// store unit reports that the last word of the last block is written (or at
// once when m or n is zero), then DONE with done high until the next start.
//
// Interface: start/params/done toward the CCU control logic, the memory port,
// and the command and read-data chain of the PE array. ROWS = SI / NUM_PE is
// the number of A' rows each PE holds (SI must be a multiple of NUM_PE).
module gemm_controller
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned SI     = 72,
  parameter int unsigned SJ     = 64,
  parameter int unsigned RD_LAT = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  gemm_params_t params,
  output logic         done,
  // system memory
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  f64_t          mem_rd_data,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr,
  output f64_t          mem_wr_data,
  // PE array
  output pe_cmd_t       pe_cmd,
  input  pe_rd_t        pe_rd
);

  localparam int unsigned ROWS = SI / NUM_PE;

  typedef enum logic [1:0] {G_IDLE, G_RUN, G_DONE} gstate_e;
  gstate_e gst;
  gemm_params_t p;

  logic      sch_busy, sch_empty, sch_v, sch_rdy;
  blk_desc_t sch_d;
  logic      ld_v, ld_rdy, ex_v, ex_rdy;
  blk_desc_t ld_d, ex_d;
  logic [1:0] bank_free;
  logic       st_done;

  logic              ex_req, ex_gnt, ex_rsp_v;
  logic [AW-1:0]     ex_addr;
  logic [META_W-1:0] ex_tag;
  logic              ld_req, ld_gnt, ld_rsp_v;
  logic [AW-1:0]     ld_addr;
  logic [META_W-1:0] ld_tag;
  logic              st_req, st_gnt;
  logic [AW-1:0]     st_addr;
  f64_t              st_data;
  f64_t              rsp_data;
  logic [META_W-1:0] rsp_tag;
  pe_cmd_t           ld_cmd, ex_cmd, st_cmd;

  always_ff @(posedge clk) begin
    if (rst) begin
      gst  <= G_IDLE;
      done <= 1'b0;
    end else begin
      unique case (gst)
        G_IDLE: if (start) begin
          p    <= params;
          done <= 1'b0;
          gst  <= G_RUN;
        end
        G_RUN: if (st_done || sch_empty) begin
          done <= 1'b1;
          gst  <= G_DONE;
        end
        G_DONE: if (start) begin
          p    <= params;
          done <= 1'b0;
          gst  <= G_RUN;
        end
        default: gst <= G_IDLE;
      endcase
    end
  end

  wire go = start && (gst != G_RUN);

  block_scheduler #(.NUM_PE(NUM_PE), .SI(SI), .SJ(SJ)) u_sched (
    .clk, .rst, .start(go), .params, .busy(sch_busy), .empty(sch_empty),
    .desc_v(sch_v), .desc(sch_d), .desc_rdy(sch_rdy)
  );

  load_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS)) u_load (
    .clk, .rst, .beta_zero(p.beta_zero), .ldc(p.ldc),
    .desc_in_v(sch_v), .desc_in(sch_d), .desc_in_rdy(sch_rdy),
    .desc_out_v(ld_v), .desc_out(ld_d), .desc_out_rdy(ld_rdy),
    .bank_free,
    .mem_req(ld_req), .mem_addr(ld_addr), .mem_tag(ld_tag), .mem_gnt(ld_gnt),
    .rsp_v(ld_rsp_v), .rsp_data, .rsp_tag, .cmd(ld_cmd)
  );

  exec_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS), .SJ(SJ)) u_exec (
    .clk, .rst, .k(p.k), .lda(p.lda), .ldb(p.ldb), .alpha_neg(p.alpha_neg),
    .desc_in_v(ld_v), .desc_in(ld_d), .desc_in_rdy(ld_rdy),
    .desc_out_v(ex_v), .desc_out(ex_d), .desc_out_rdy(ex_rdy),
    .mem_req(ex_req), .mem_addr(ex_addr), .mem_tag(ex_tag), .mem_gnt(ex_gnt),
    .rsp_v(ex_rsp_v), .rsp_data, .rsp_tag, .cmd(ex_cmd)
  );

  store_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS)) u_store (
    .clk, .rst, .ldc(p.ldc),
    .desc_in_v(ex_v), .desc_in(ex_d), .desc_in_rdy(ex_rdy),
    .bank_free, .cmd(st_cmd), .rd(pe_rd),
    .mem_req(st_req), .mem_addr(st_addr), .mem_data(st_data), .mem_gnt(st_gnt),
    .done(st_done)
  );

  mem_mux #(.RD_LAT(RD_LAT)) u_mux (
    .clk, .rst,
    .ex_req, .ex_addr, .ex_tag, .ex_gnt, .ex_rsp_v,
    .st_req, .st_addr, .st_data, .st_gnt,
    .ld_req, .ld_addr, .ld_tag, .ld_gnt, .ld_rsp_v,
    .rsp_data, .rsp_tag,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data
  );

  assign pe_cmd = ld_cmd | ex_cmd | st_cmd;

  a_start_when_idle: assert property (@(posedge clk) disable iff (rst) start |-> gst != G_RUN);

endmodule
