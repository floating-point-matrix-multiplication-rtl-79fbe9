// store_unit: writes a finished block C' from the PE array back to memory.
//
// When the exec unit hands over a block, the unit walks C' in the same order
// as the load unit (column j outer, row r inner). For each element it sends a
// read to PE (r mod NUM_PE), local address j*ROWS + r/NUM_PE, and pushes the
// memory address c_addr + r + j*ldc into an address FIFO. The answers come
// back in order from the end of the PE chain into a data FIFO; whenever that
// FIFO holds a word, the unit asks the memory multiplexer for a write cycle.
// A read is only sent while the address FIFO has room, so answers always have
// room too. When every read of a block has been sent, the C buffer set is
// released to the load unit (bank_free). When the last word of the block
// flagged 'last' has been written, done pulses for one cycle.
//
// Interface: descriptor in (valid/ready) from the exec unit, the C-read fields
// of the PE command, the read-data chain from the last PE, a write request to
// the memory multiplexer. The FIFO on the write path is the one the document
// draws between the last PE and the memory write port; its depth and the
// handshakes are this design's choices.
module store_unit
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned ROWS   = 8,
  parameter int unsigned FDEPTH = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DIM_W-1:0]  ldc,
  // from exec unit
  input  logic              desc_in_v,
  input  blk_desc_t         desc_in,
  output logic              desc_in_rdy,
  // C buffer set free for the load unit
  output logic [1:0]        bank_free,
  // PE array
  output pe_cmd_t           cmd,
  input  pe_rd_t            rd,
  // memory write port
  output logic              mem_req,
  output logic [AW-1:0]     mem_addr,
  output f64_t              mem_data,
  input  logic              mem_gnt,
  // all blocks stored
  output logic              done
);

  localparam int unsigned FCW = $clog2(FDEPTH) + 1;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE} state_e;
  state_e state;

  blk_desc_t        d;
  logic [DIM_W-1:0] r, j;
  logic [AW-1:0]    col_addr, addr;
  logic [PE_W-1:0]  pe;
  logic [LA_W-1:0]  col_la, la;
  logic             last_el, issue;

  typedef struct packed {
    logic [AW-1:0] addr;
    logic          last;   // final word of the whole operation
  } st_addr_t;

  st_addr_t af_dout;
  logic af_empty, af_full, df_empty, df_full;
  logic [FCW-1:0] af_count, df_count;
  f64_t df_dout;

  assign last_el     = (r == d.rows - 1'b1) && (j == d.cols - 1'b1);
  assign issue       = (state == S_ISSUE) && !af_full;
  assign desc_in_rdy = (state == S_IDLE);

  sync_fifo #(.T(st_addr_t), .DEPTH(FDEPTH)) u_afifo (
    .clk, .rst, .push(issue), .din('{addr: addr, last: last_el && d.last}),
    .pop(mem_gnt), .dout(af_dout), .empty(af_empty), .full(af_full), .count(af_count)
  );
  sync_fifo #(.T(f64_t), .DEPTH(FDEPTH)) u_dfifo (
    .clk, .rst, .push(rd.v), .din(rd.data),
    .pop(mem_gnt), .dout(df_dout), .empty(df_empty), .full(df_full), .count(df_count)
  );

  assign mem_req  = !df_empty;
  assign mem_addr = af_dout.addr;
  assign mem_data = df_dout;

  always_comb begin
    cmd = '0;
    if (issue) begin
      cmd.r_v    = 1'b1;
      cmd.r_pe   = pe;
      cmd.r_bank = d.bank;
      cmd.r_addr = la;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      bank_free <= '0;
      done      <= 1'b0;
    end else begin
      bank_free <= '0;
      done      <= mem_gnt && af_dout.last;
      unique case (state)
        S_IDLE: if (desc_in_v) begin
          d        <= desc_in;
          r <= '0; j <= '0; pe <= '0;
          col_addr <= desc_in.c_addr;
          addr     <= desc_in.c_addr;
          col_la   <= '0;
          la       <= '0;
          state    <= S_ISSUE;
        end
        S_ISSUE: if (issue) begin
          if (last_el) begin
            bank_free[d.bank] <= 1'b1;
            state <= S_IDLE;
          end else if (r == d.rows - 1'b1) begin
            r        <= '0;
            j        <= j + 1'b1;
            pe       <= '0;
            col_addr <= col_addr + AW'(ldc);
            addr     <= col_addr + AW'(ldc);
            col_la   <= col_la + LA_W'(ROWS);
            la       <= col_la + LA_W'(ROWS);
          end else begin
            r    <= r + 1'b1;
            addr <= addr + 1'b1;
            if (pe == PE_W'(NUM_PE - 1)) begin
              pe <= '0;
              la <= la + 1'b1;
            end else begin
              pe <= pe + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_data_has_addr: assert property (@(posedge clk) disable iff (rst) !df_empty |-> !af_empty);

endmodule
