// block_scheduler: cuts C (m x n) into blocks C' of at most SI x SJ words.
//
// Blocks are produced column band by column band (outer loop over columns of
// C in steps of SJ, inner loop over rows in steps of SI). For each block the
// scheduler hands the load unit a descriptor with the start addresses of
// A'(0,0), B'(0,0) and C'(0,0), the block's rows and columns (smaller at the
// right and bottom edges, so any m and n work), the rows per PE
// ieff = ceil(rows / NUM_PE), and a flag on the last block. Matrices are in
// column-major order with leading dimensions lda, ldb, ldc (word addresses).
// All address arithmetic uses additions only: SJ*ldb and SJ*ldc are built by
// SJ repeated additions in a setup phase after start, and ieff is found by
// comparing rows with the constants NUM_PE, 2*NUM_PE, ...
//
// Interface: start (one cycle) latches params; descriptors are offered on
// desc_v/desc and taken with desc_rdy. empty is raised (instead of any
// descriptor) when m or n is zero. busy is high from start until the last
// descriptor is taken. k must be at least 1.
module block_scheduler
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned SI     = 72,
  parameter int unsigned SJ     = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  gemm_params_t params,
  output logic         busy,
  output logic         empty,
  output logic         desc_v,
  output blk_desc_t    desc,
  input  logic         desc_rdy
);

  localparam int unsigned ROWS = SI / NUM_PE;
  localparam int unsigned SJW  = $clog2(SJ + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_RUN} state_e;
  state_e state;

  gemm_params_t     p;
  logic [SJW-1:0]   setup_cnt;
  logic [AW-1:0]    ldb_sj, ldc_sj;       // SJ*ldb, SJ*ldc
  logic [DIM_W-1:0] rem_m, rem_n;         // rows / columns not yet covered
  logic [AW-1:0]    a_row, c_row;         // start of current block
  logic [AW-1:0]    b_band, c_band;       // start of current column band

  logic [DIM_W-1:0] rows, cols;
  logic [Q_W-1:0]   ieff;
  logic             last_row, last_col;
  logic             bank;

  always_comb begin
    rows     = (rem_m > DIM_W'(SI)) ? DIM_W'(SI) : rem_m;
    cols     = (rem_n > DIM_W'(SJ)) ? DIM_W'(SJ) : rem_n;
    last_row = (rem_m <= DIM_W'(SI));
    last_col = (rem_n <= DIM_W'(SJ));
    ieff = '0;
    for (int q = 0; q < ROWS; q++)
      if (rows > DIM_W'(q * NUM_PE)) ieff = Q_W'(q + 1);
  end

  assign desc_v = (state == S_RUN);
  always_comb begin
    desc.a_addr = a_row;
    desc.b_addr = b_band;
    desc.c_addr = c_row;
    desc.rows   = rows;
    desc.cols   = cols;
    desc.ieff   = ieff;
    desc.bank   = bank;
    desc.last   = last_row && last_col;
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      empty <= 1'b0;
      bank  <= 1'b0;
    end else begin
      empty <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p         <= params;
          bank      <= 1'b0;
          setup_cnt <= '0;
          ldb_sj    <= '0;
          ldc_sj    <= '0;
          if (params.m == '0 || params.n == '0) empty <= 1'b1;
          else                                    state <= S_SETUP;
        end
        S_SETUP: begin
          ldb_sj    <= ldb_sj + AW'(p.ldb);
          ldc_sj    <= ldc_sj + AW'(p.ldc);
          setup_cnt <= setup_cnt + 1'b1;
          if (setup_cnt == SJW'(SJ - 1)) begin
            state  <= S_RUN;
            rem_m  <= p.m;
            rem_n  <= p.n;
            a_row  <= p.a;
            c_row  <= p.c;
            b_band <= p.b;
            c_band <= p.c;
          end
        end
        S_RUN: if (desc_rdy) begin
          bank <= ~bank;
          if (!last_row) begin
            rem_m <= rem_m - DIM_W'(SI);
            a_row <= a_row + AW'(SI);
            c_row <= c_row + AW'(SI);
          end else if (!last_col) begin
            rem_m  <= p.m;
            rem_n  <= rem_n - DIM_W'(SJ);
            a_row  <= p.a;
            b_band <= b_band + ldb_sj;
            c_band <= c_band + ldc_sj;
            c_row  <= c_band + ldc_sj;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
