// mem_mux: memory multiplexer of the GEMM controller.
//
// The system memory has one port that does either one 64-bit read or one
// 64-bit write per cycle, so only one unit may use it at a time. Requests are
// granted in fixed priority: the exec unit first (it keeps the PEs busy and
// needs a steady A/B stream), then the store unit (writes from its FIFO, which
// frees the C buffer set the next block needs), then the load unit.
// A unit sees its grant in the same cycle as its request (combinational) and
// must hold the request until granted.
//
// Each read carries a tag. Memory answers RD_LAT cycles after the request;
// the multiplexer delays the tag by the same amount and hands data and tag to
// the unit that asked. The priority order and the fixed-latency read model are
// this design's choices; the document states only that one unit accesses the
// memory at a time.
module mem_mux
  import gemm_pkg::*;
#(
  parameter int unsigned RD_LAT = 1
) (
  input  logic              clk,
  input  logic              rst,
  // exec unit: reads of A and B
  input  logic              ex_req,
  input  logic [AW-1:0]     ex_addr,
  input  logic [META_W-1:0] ex_tag,
  output logic              ex_gnt,
  output logic              ex_rsp_v,
  // store unit: writes of C
  input  logic              st_req,
  input  logic [AW-1:0]     st_addr,
  input  f64_t              st_data,
  output logic              st_gnt,
  // load unit: reads of C
  input  logic              ld_req,
  input  logic [AW-1:0]     ld_addr,
  input  logic [META_W-1:0] ld_tag,
  output logic              ld_gnt,
  output logic              ld_rsp_v,
  // shared read answer
  output f64_t              rsp_data,
  output logic [META_W-1:0] rsp_tag,
  // system memory port
  output logic              mem_rd_en,
  output logic [AW-1:0]     mem_rd_addr,
  input  f64_t              mem_rd_data,
  output logic              mem_wr_en,
  output logic [AW-1:0]     mem_wr_addr,
  output f64_t              mem_wr_data
);

  // ---------------- arbitration
  always_comb begin
    ex_gnt = ex_req;
    st_gnt = st_req && !ex_req;
    ld_gnt = ld_req && !ex_req && !st_req;

    mem_rd_en   = ex_gnt || ld_gnt;
    mem_rd_addr = ex_gnt ? ex_addr : ld_addr;
    mem_wr_en   = st_gnt;
    mem_wr_addr = st_addr;
    mem_wr_data = st_data;
  end

  // ---------------- read tag pipeline
  mem_src_e          src_q [RD_LAT];
  logic [META_W-1:0] tag_q [RD_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < RD_LAT; i++) src_q[i] <= SRC_NONE;
    end else begin
      src_q[0] <= ex_gnt ? SRC_EXEC : (ld_gnt ? SRC_LOAD : SRC_NONE);
      for (int i = 1; i < RD_LAT; i++) src_q[i] <= src_q[i-1];
    end
    tag_q[0] <= ex_gnt ? ex_tag : ld_tag;
    for (int i = 1; i < RD_LAT; i++) tag_q[i] <= tag_q[i-1];
  end

  assign ex_rsp_v = (src_q[RD_LAT-1] == SRC_EXEC);
  assign ld_rsp_v = (src_q[RD_LAT-1] == SRC_LOAD);
  assign rsp_data = mem_rd_data;
  assign rsp_tag  = tag_q[RD_LAT-1];

  a_one_access: assert property (@(posedge clk) disable iff (rst) !(mem_rd_en && mem_wr_en));

endmodule
