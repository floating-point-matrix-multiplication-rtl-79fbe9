// exec_unit: feeds the PE array with A' and B' and issues the multiply-adds.
//
// For every block and every k-iteration kk the unit
//   1. reads column kk of A' (rows words, address a_addr + kk*lda + r) and
//      writes element r into the A buffer of PE (r mod NUM_PE), row r/NUM_PE,
//      in the A buffer set of that iteration (sets alternate every iteration);
//   2. reads row kk of B' (cols words, address b_addr + kk + j*ldb) into a
//      B stream FIFO;
//   3. when column kk is complete, broadcasts every B element j to all PEs
//      for ieff consecutive cycles, one per local row q, each cycle issuing
//      C(q, j) += A(q) * B(j) at C buffer address j*ROWS + q.
// Steps 1-2 (fetch side) run ahead of step 3 (compute side) by up to one
// iteration, so the next column of A' is loaded into the second A buffer set
// while the PEs still work on the first (memory switching). The fetch side
// also runs into the next block, so the PEs move from block to block without
// a pause when the memory keeps up.
//
// An iteration issues ieff*cols multiply-adds. Because the multiply-add takes
// MAC_LAT cycles and its result is written back one cycle after that, an
// iteration is padded with idle slots to at least MAC_LAT+2 slots, so that no
// C element is read before its previous sum is written back (this matters
// only for small edge blocks). After the last iteration of a block the
// descriptor is held for another MAC_LAT+2 cycles before it is handed to the
// store unit, so that the last sums are in the buffer. alpha = -1 is applied
// by flipping the sign of each A element on its way into the buffer.
//
// Interface: descriptors in from the load unit and out to the store unit
// (valid/ready), a tagged memory read port (see mem_mux), and the A-write and
// multiply-add fields of the PE command. k must be at least 1. The order
// "column of A', then row of B'", the switching of A buffer sets and the
// k-fold loop follow the document; the B FIFO, the padding rule and the
// handshakes are this design's choices.
module exec_unit
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned ROWS   = 8,
  parameter int unsigned SJ     = 64,
  parameter int unsigned BDEPTH = 2 * SJ
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DIM_W-1:0]  k,
  input  logic [DIM_W-1:0]  lda,
  input  logic [DIM_W-1:0]  ldb,
  input  logic              alpha_neg,
  // from load unit
  input  logic              desc_in_v,
  input  blk_desc_t         desc_in,
  output logic              desc_in_rdy,
  // to store unit
  output logic              desc_out_v,
  output blk_desc_t         desc_out,
  input  logic              desc_out_rdy,
  // memory read port
  output logic              mem_req,
  output logic [AW-1:0]     mem_addr,
  output logic [META_W-1:0] mem_tag,
  input  logic              mem_gnt,
  input  logic              rsp_v,
  input  f64_t              rsp_data,
  input  logic [META_W-1:0] rsp_tag,
  // A-write and multiply-add fields of the PE command
  output pe_cmd_t           cmd
);

  localparam int unsigned PMIN  = MAC_LAT + 2;
  localparam int unsigned DRAIN = MAC_LAT + 2;
  localparam int unsigned BCW   = $clog2(BDEPTH + 1);
  localparam int unsigned POSW  = $clog2(PMIN + 1);

  // =========================================================== fetch side
  typedef enum logic [1:0] {F_IDLE, F_START, F_A, F_B} fstate_e;
  fstate_e          fst;
  blk_desc_t        fd;
  logic [DIM_W-1:0] f_kk, f_r, f_j;
  logic [AW-1:0]    f_col, f_aaddr, f_brow, f_baddr;
  logic [PE_W-1:0]  f_pe;
  logic [Q_W-1:0]   f_q;
  logic             f_abank;
  logic [1:0]       ahead;      // iterations fetched or being fetched, not yet computed
  logic [1:0]       a_ready;    // A columns complete, iteration not yet started
  logic [BCW-1:0]   b_credit;   // B words requested and not yet consumed

  logic cq_push, cq_pop, cq_empty, cq_full;
  blk_desc_t cq_dout;
  logic [1:0] cq_count;

  sync_fifo #(.T(blk_desc_t), .DEPTH(2)) u_cq (
    .clk, .rst, .push(cq_push), .din(desc_in), .pop(cq_pop),
    .dout(cq_dout), .empty(cq_empty), .full(cq_full), .count(cq_count)
  );

  assign desc_in_rdy = (fst == F_IDLE) && !cq_full;
  assign cq_push     = desc_in_v && desc_in_rdy;

  logic f_last_a, f_last_b, f_start_ok;
  assign f_last_a   = (f_r == fd.rows - 1'b1);
  assign f_last_b   = (f_j == fd.cols - 1'b1);

  exec_tag_t ftag;
  always_comb begin
    ftag          = '0;
    ftag.is_b     = (fst == F_B);
    ftag.pe       = f_pe;
    ftag.q        = f_q;
    ftag.bank     = f_abank;
    ftag.col_last = f_last_a;
    mem_tag  = META_W'(ftag);
    mem_req  = (fst == F_A) || (fst == F_B && b_credit < BCW'(BDEPTH));
    mem_addr = (fst == F_A) ? f_aaddr : f_baddr;
  end

  logic iter_end;    // compute side finished an iteration (this cycle)
  logic iter_begin;  // compute side starts an iteration (this cycle)
  logic b_pop;

  assign f_start_ok = (fst == F_START) && (ahead < 2'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      fst     <= F_IDLE;
      f_abank <= 1'b0;
    end else begin
      unique case (fst)
        F_IDLE: if (cq_push) begin
          fd      <= desc_in;
          f_kk    <= '0;
          f_col   <= desc_in.a_addr;
          f_brow  <= desc_in.b_addr;
          fst     <= F_START;
        end
        F_START: if (f_start_ok) begin
          f_r     <= '0;
          f_pe    <= '0;
          f_q     <= '0;
          f_aaddr <= f_col;
          f_j     <= '0;
          f_baddr <= f_brow;
          fst     <= F_A;
        end
        F_A: if (mem_gnt) begin
          if (f_last_a) begin
            fst <= F_B;
          end else begin
            f_r     <= f_r + 1'b1;
            f_aaddr <= f_aaddr + 1'b1;
            if (f_pe == PE_W'(NUM_PE - 1)) begin
              f_pe <= '0;
              f_q  <= f_q + 1'b1;
            end else begin
              f_pe <= f_pe + 1'b1;
            end
          end
        end
        F_B: if (mem_gnt) begin
          if (f_last_b) begin
            f_abank <= ~f_abank;
            if (f_kk == k - 1'b1) begin
              fst <= F_IDLE;
            end else begin
              f_kk   <= f_kk + 1'b1;
              f_col  <= f_col + AW'(lda);
              f_brow <= f_brow + 1'b1;
              fst    <= F_START;
            end
          end else begin
            f_j     <= f_j + 1'b1;
            f_baddr <= f_baddr + AW'(ldb);
          end
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  // iteration bookkeeping shared by both sides
  exec_tag_t rtag;
  assign rtag = exec_tag_t'(rsp_tag);
  wire a_col_done = rsp_v && !rtag.is_b && rtag.col_last;

  always_ff @(posedge clk) begin
    if (rst) begin
      ahead    <= '0;
      a_ready  <= '0;
      b_credit <= '0;
    end else begin
      ahead    <= ahead + 2'(f_start_ok) - 2'(iter_end);
      a_ready  <= a_ready + 2'(a_col_done) - 2'(iter_begin);
      b_credit <= b_credit + BCW'(fst == F_B && mem_gnt) - BCW'(b_pop);
    end
  end

  // B stream
  f64_t b_head;
  logic b_empty, b_full;
  logic [$clog2(BDEPTH):0] b_count;
  sync_fifo #(.T(f64_t), .DEPTH(BDEPTH)) u_bfifo (
    .clk, .rst, .push(rsp_v && rtag.is_b), .din(rsp_data), .pop(b_pop),
    .dout(b_head), .empty(b_empty), .full(b_full), .count(b_count)
  );

  // ========================================================= compute side
  typedef enum logic [1:0] {C_IDLE, C_START, C_RUN, C_DONE} cstate_e;
  cstate_e          cst;
  blk_desc_t        cd;
  logic [DIM_W-1:0] c_kk, c_j;
  logic [Q_W-1:0]   c_q;
  logic [LA_W-1:0]  c_la;          // j*ROWS
  logic [POSW-1:0]  c_pos;         // slots used in this iteration (saturating)
  logic             c_mac_done;
  logic             c_abank;

  // finished block waiting for its last sums, then for the store unit
  logic             dn_v;
  blk_desc_t        dn_d;
  logic [$clog2(DRAIN+1)-1:0] dn_cnt;

  logic need_b, stall, slot, last_mac, last_slot, last_iter;
  always_comb begin
    need_b    = !c_mac_done;
    stall     = need_b && b_empty;
    slot      = (cst == C_RUN) && !stall;
    last_mac  = need_b && (c_q == cd.ieff - 1'b1) && (c_j == cd.cols - 1'b1);
    last_slot = (c_mac_done || last_mac) && (c_pos >= POSW'(PMIN - 1));
    last_iter = (c_kk == k - 1'b1);
    iter_end  = slot && last_slot;
    iter_begin = ((cst == C_START) && (a_ready != 2'd0)) ||
                 (iter_end && !last_iter && (a_ready != 2'd0));
    b_pop     = slot && need_b && (c_q == cd.ieff - 1'b1);
    cq_pop    = (cst == C_IDLE) && !cq_empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cst     <= C_IDLE;
      c_abank <= 1'b0;
      dn_v    <= 1'b0;
    end else begin
      if (dn_v && dn_cnt != '0) dn_cnt <= dn_cnt - 1'b1;
      if (desc_out_v && desc_out_rdy) dn_v <= 1'b0;
      unique case (cst)
        C_IDLE: if (cq_pop) begin
          cd   <= cq_dout;
          c_kk <= '0;
          cst  <= C_START;
        end
        C_START: if (iter_begin) begin
          c_j <= '0; c_q <= '0; c_la <= '0; c_pos <= '0; c_mac_done <= 1'b0;
          cst <= C_RUN;
        end
        C_RUN: if (slot) begin
          if (c_pos != POSW'(PMIN)) c_pos <= c_pos + 1'b1;
          if (need_b) begin
            if (c_q == cd.ieff - 1'b1) begin
              c_q  <= '0;
              c_j  <= c_j + 1'b1;
              c_la <= c_la + LA_W'(ROWS);
              if (c_j == cd.cols - 1'b1) c_mac_done <= 1'b1;
            end else begin
              c_q <= c_q + 1'b1;
            end
          end
          if (last_slot) begin
            c_abank <= ~c_abank;
            if (last_iter) begin
              cst <= C_DONE;
            end else begin
              c_kk <= c_kk + 1'b1;
              if (iter_begin) begin
                c_j <= '0; c_q <= '0; c_la <= '0; c_pos <= '0; c_mac_done <= 1'b0;
              end else begin
                cst <= C_START;
              end
            end
          end
        end
        C_DONE: if (!dn_v || (desc_out_v && desc_out_rdy)) begin
          dn_v   <= 1'b1;
          dn_d   <= cd;
          dn_cnt <= ($clog2(DRAIN+1))'(DRAIN);
          cst    <= C_IDLE;
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

  assign desc_out_v = dn_v && (dn_cnt == '0);
  assign desc_out   = dn_d;

  // ========================================================= PE command
  always_comb begin
    cmd = '0;
    // A column element returning from memory
    if (rsp_v && !rtag.is_b) begin
      cmd.a_we   = 1'b1;
      cmd.a_pe   = rtag.pe;
      cmd.a_bank = rtag.bank;
      cmd.a_q    = rtag.q;
      cmd.wdata  = {rsp_data[63] ^ alpha_neg, rsp_data[62:0]};
    end
    if (slot && need_b) begin
      cmd.mac_v     = 1'b1;
      cmd.mac_abank = c_abank;
      cmd.mac_q     = c_q;
      cmd.mac_cbank = cd.bank;
      cmd.mac_caddr = c_la + LA_W'(c_q);
      cmd.b         = b_head;
    end
  end

  a_ahead_range:  assert property (@(posedge clk) disable iff (rst) ahead <= 2'd2);
  a_bcredit:      assert property (@(posedge clk) disable iff (rst) b_credit <= BCW'(BDEPTH));

endmodule
