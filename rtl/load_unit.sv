// load_unit: fills one C buffer set of the PE array with the block C' that is
// to be computed next.
//
// A block descriptor from the block scheduler is accepted once the C buffer
// set it names is free (the store unit has read out the block that used it
// before). The unit then walks C' column by column (j outer, row r inner,
// memory address c_addr + r + j*ldc) and, for every element, sends a write to
// PE (r mod NUM_PE), local address j*ROWS + r/NUM_PE. With beta = 1 the value
// is read from system memory through the memory multiplexer and written when
// the answer returns; with beta = 0 the unit writes zeros and does not touch
// memory. When the last element has been written the descriptor is passed to
// the exec unit.
//
// Interface: desc_in_v/desc_in/desc_in_rdy from the scheduler,
// desc_out_v/desc_out/desc_out_rdy to the exec unit, a memory read port with
// tag (see mem_mux), the C-write fields of the PE command (cmd), and
// bank_free (one cycle per set) from the store unit. One element per cycle
// when memory is available. The document names the unit and its task; the
// walk order and the handshakes are this design's choices.
module load_unit
  import gemm_pkg::*;
#(
  parameter int unsigned NUM_PE = 9,
  parameter int unsigned ROWS   = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              beta_zero,
  input  logic [DIM_W-1:0]  ldc,
  // from block scheduler
  input  logic              desc_in_v,
  input  blk_desc_t         desc_in,
  output logic              desc_in_rdy,
  // to exec unit
  output logic              desc_out_v,
  output blk_desc_t         desc_out,
  input  logic              desc_out_rdy,
  // C buffer set released by the store unit
  input  logic [1:0]        bank_free,
  // memory read port
  output logic              mem_req,
  output logic [AW-1:0]     mem_addr,
  output logic [META_W-1:0] mem_tag,
  input  logic              mem_gnt,
  input  logic              rsp_v,
  input  f64_t              rsp_data,
  input  logic [META_W-1:0] rsp_tag,
  // C-buffer write fields of the PE command
  output pe_cmd_t           cmd
);

  typedef enum logic [1:0] {L_IDLE, L_ISSUE, L_WAIT, L_PASS} state_e;
  state_e state;

  blk_desc_t        d;
  logic [1:0]       bank_busy;
  logic [DIM_W-1:0] r, j;
  logic [AW-1:0]    col_addr, addr;
  logic [PE_W-1:0]  pe;
  logic [LA_W-1:0]  col_la, la;
  logic             last_el;

  assign last_el     = (r == d.rows - 1'b1) && (j == d.cols - 1'b1);
  assign desc_in_rdy = (state == L_IDLE) && !bank_busy[desc_in.bank];
  assign desc_out_v  = (state == L_PASS);
  assign desc_out    = d;

  wire issue = (state == L_ISSUE) && (beta_zero || mem_gnt);

  assign mem_req  = (state == L_ISSUE) && !beta_zero;
  assign mem_addr = addr;
  load_tag_t tag;
  always_comb begin
    tag      = '0;
    tag.pe   = pe;
    tag.addr = la;
    tag.bank = d.bank;
    tag.last = last_el;
  end
  assign mem_tag = META_W'(tag);

  // C-buffer writes: memory answers, or zeros for beta = 0
  load_tag_t rt;
  always_comb begin
    rt  = load_tag_t'(rsp_tag);
    cmd = '0;
    if (rsp_v) begin
      cmd.c_we   = 1'b1;
      cmd.c_pe   = rt.pe;
      cmd.c_bank = rt.bank;
      cmd.c_addr = rt.addr;
      cmd.wdata  = rsp_data;
    end else if (issue && beta_zero) begin
      cmd.c_we   = 1'b1;
      cmd.c_zero = 1'b1;
      cmd.c_pe   = pe;
      cmd.c_bank = d.bank;
      cmd.c_addr = la;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= L_IDLE;
      bank_busy <= '0;
    end else begin
      bank_busy <= bank_busy & ~bank_free;
      unique case (state)
        L_IDLE: if (desc_in_v && desc_in_rdy) begin
          d         <= desc_in;
          bank_busy[desc_in.bank] <= 1'b1;
          r <= '0; j <= '0; pe <= '0;
          col_addr  <= desc_in.c_addr;
          addr      <= desc_in.c_addr;
          col_la    <= '0;
          la        <= '0;
          state     <= L_ISSUE;
        end
        L_ISSUE: if (issue) begin
          if (last_el) begin
            state <= beta_zero ? L_PASS : L_WAIT;
          end else if (r == d.rows - 1'b1) begin     // next column of C'
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
        L_WAIT: if (rsp_v && rt.last) state <= L_PASS;
        L_PASS: if (desc_out_rdy) state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end

endmodule
