// gemm_pe: one processing element of the linear multiply-add array.
//
// Each PE owns a slice of the current block C' = A'B' + C': with NUM_PE PEs,
// row r of the block lives in PE (r mod NUM_PE) as local row q = r / NUM_PE.
// The PE holds
//   * an A buffer with two sets of ROWS words: one set is read by the
//     multiply-add while the exec unit fills the other with the next column
//     of A' (memory switching);
//   * a C buffer with two sets of ROWS*SJ words: one set accumulates the
//     current block while the other is emptied by the store unit and refilled
//     by the load unit with the next block;
//   * an 11-cycle double-precision multiply-add unit.
// C'(q, j) of this PE is at local address j*ROWS + q.
//
// Interface: cmd_in is the command word from the previous PE (or from the
// controller for PE 0); it is registered and passed on as cmd_out, so a
// command reaches PE p p cycles after it enters the array. A multiply-add
// command is broadcast: every PE reads A[mac_abank][mac_q] and
// C[mac_cbank][mac_caddr] when it sees the command, multiplies by the
// broadcast B element and writes the sum back MAC_LAT+1 cycles later. The
// issuer must not read an address again before that write (exec unit keeps
// at least MAC_LAT+2 cycles between the two). Buffer writes and C reads carry
// a target PE index. Read data of the store path travels on the rd chain:
// a PE inserts its answer one cycle after it sees the read command and
// otherwise forwards rd_in delayed by one register, so an answer leaves the
// last PE exactly NUM_PE cycles after the read entered PE 0.
//
// The buffer organisation follows the document (two buffers with memory
// switching, one multiply-add unit per PE); the command-chain format and the
// row-to-PE mapping are this design's choices.
module gemm_pe
  import gemm_pkg::*;
#(
  parameter int unsigned PE_ID = 0,
  parameter int unsigned ROWS  = 8,    // i: rows of A' per PE
  parameter int unsigned SJ    = 64    // S_j: columns of a block
) (
  input  logic    clk,
  input  logic    rst,
  input  pe_cmd_t cmd_in,
  output pe_cmd_t cmd_out,
  input  pe_rd_t  rd_in,
  output pe_rd_t  rd_out
);

  localparam int unsigned CDEPTH = ROWS * SJ;
  localparam int unsigned CAW    = (CDEPTH > 1) ? $clog2(CDEPTH) : 1;
  localparam int unsigned QAW    = (ROWS > 1) ? $clog2(ROWS) : 1;

  // ---------------- command forwarding
  always_ff @(posedge clk) begin
    if (rst) cmd_out <= '0;
    else     cmd_out <= cmd_in;
  end

  wire a_wr_me = cmd_in.a_we && (cmd_in.a_pe == PE_W'(PE_ID));
  wire c_wr_me = cmd_in.c_we && (cmd_in.c_pe == PE_W'(PE_ID));
  wire c_rd_me = cmd_in.r_v  && (cmd_in.r_pe == PE_W'(PE_ID));

  // ---------------- A buffer, two sets
  f64_t a_rdata [2];
  for (genvar s = 0; s < 2; s++) begin : g_abuf
    dp_ram #(.WIDTH(DW), .DEPTH(ROWS)) u_abuf (
      .clk,
      .we   (a_wr_me && cmd_in.a_bank == 1'(s)),
      .waddr(QAW'(cmd_in.a_q)),
      .wdata(cmd_in.wdata),
      .re   (cmd_in.mac_v && cmd_in.mac_abank == 1'(s)),
      .raddr(QAW'(cmd_in.mac_q)),
      .rdata(a_rdata[s])
    );
  end

  // ---------------- multiply-add write-back tracking
  logic                mac_v1;      // operands valid at the MAC input
  logic                mac_abank1, mac_cbank1;
  f64_t                b1;
  logic [MAC_LAT:0]    wb_v;        // delay line of write-back enables
  logic                wb_bank [MAC_LAT+1];
  logic [CAW-1:0]      wb_addr [MAC_LAT+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      mac_v1 <= 1'b0;
      wb_v   <= '0;
    end else begin
      mac_v1 <= cmd_in.mac_v;
      wb_v   <= {wb_v[MAC_LAT-1:0], cmd_in.mac_v};
    end
    mac_abank1 <= cmd_in.mac_abank;
    mac_cbank1 <= cmd_in.mac_cbank;
    b1         <= cmd_in.b;
    wb_bank[0] <= cmd_in.mac_cbank;
    wb_addr[0] <= CAW'(cmd_in.mac_caddr);
    for (int i = 1; i <= MAC_LAT; i++) begin
      wb_bank[i] <= wb_bank[i-1];
      wb_addr[i] <= wb_addr[i-1];
    end
  end

  // write-back happens when the MAC result appears (MAC_LAT+1 after the command)
  wire            wb_en   = wb_v[MAC_LAT];
  wire            wb_b    = wb_bank[MAC_LAT];
  wire [CAW-1:0]  wb_a    = wb_addr[MAC_LAT];

  // ---------------- C buffer, two sets
  f64_t c_rdata [2];
  f64_t mac_y;
  logic mac_yv;
  logic rd_hit1, rd_bank1;

  for (genvar s = 0; s < 2; s++) begin : g_cbuf
    logic           we, re;
    logic [CAW-1:0] waddr, raddr;
    f64_t           wdata;
    always_comb begin
      // write port: MAC write-back, else load unit
      if (wb_en && wb_b == 1'(s)) begin
        we = 1'b1; waddr = wb_a; wdata = mac_y;
      end else begin
        we    = c_wr_me && cmd_in.c_bank == 1'(s);
        waddr = CAW'(cmd_in.c_addr);
        wdata = cmd_in.c_zero ? '0 : cmd_in.wdata;
      end
      // read port: MAC operand, else store unit
      if (cmd_in.mac_v && cmd_in.mac_cbank == 1'(s)) begin
        re = 1'b1; raddr = CAW'(cmd_in.mac_caddr);
      end else begin
        re = c_rd_me && cmd_in.r_bank == 1'(s);
        raddr = CAW'(cmd_in.r_addr);
      end
    end
    dp_ram #(.WIDTH(DW), .DEPTH(CDEPTH)) u_cbuf (
      .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(c_rdata[s])
    );
  end

  // ---------------- multiply-add unit
  fp64_mac u_mac (
    .clk, .rst,
    .in_v (mac_v1),
    .a    (a_rdata[mac_abank1]),
    .b    (b1),
    .c    (c_rdata[mac_cbank1]),
    .out_v(mac_yv),
    .y    (mac_y)
  );

  // ---------------- read-data chain
  pe_rd_t rd_fwd;
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_fwd  <= '0;
      rd_hit1 <= 1'b0;
    end else begin
      rd_fwd  <= rd_in;
      rd_hit1 <= c_rd_me;
    end
    rd_bank1 <= cmd_in.r_bank;
  end

  always_comb begin
    if (rd_hit1) rd_out = '{v: 1'b1, data: c_rdata[rd_bank1]};
    else         rd_out = rd_fwd;
  end

  // ---------------- rules of use
  // the MAC result must come out exactly when the write-back slot expects it
  a_wb_aligned:   assert property (@(posedge clk) disable iff (rst) mac_yv == wb_en);
  // the load unit never writes the set that is being written back
  a_no_wr_clash:  assert property (@(posedge clk) disable iff (rst)
                    !(wb_en && c_wr_me && cmd_in.c_bank == wb_b));
  // the store unit never reads the set that the MAC reads
  a_no_rd_clash:  assert property (@(posedge clk) disable iff (rst)
                    !(cmd_in.mac_v && c_rd_me && cmd_in.r_bank == cmd_in.mac_cbank));
  // A writes go to the set not being read
  a_no_a_clash:   assert property (@(posedge clk) disable iff (rst)
                    !(cmd_in.mac_v && a_wr_me && cmd_in.a_bank == cmd_in.mac_abank));

endmodule
