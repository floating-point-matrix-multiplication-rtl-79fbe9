// tb_load_unit: the load unit with a memory model (random grants, read
// latency 2, word = function of its address) and a model of the C buffers
// that records every C write. For blocks of several shapes and both beta
// values it checks that each element C'(r, j) lands in PE r mod 3 at local
// address j*ROWS + r/3 of the block's buffer set with the word at
// c + r + j*ldc (or zero for beta = 0, without any memory read), that the
// descriptor is passed on only after the whole block is written, and that a
// block is not accepted while its buffer set is still busy (until bank_free).
`timescale 1ns/1ps
module tb_load_unit;
  import gemm_pkg::*;
  localparam int NUM_PE = 3, ROWS = 2, SJ = 4, RD_LAT = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic beta_zero;
  logic [DIM_W-1:0] ldc;
  logic desc_in_v, desc_in_rdy, desc_out_v, desc_out_rdy;
  blk_desc_t desc_in, desc_out;
  logic [1:0] bank_free;
  logic mem_req, mem_gnt, rsp_v;
  logic [AW-1:0] mem_addr;
  logic [META_W-1:0] mem_tag, rsp_tag;
  f64_t rsp_data;
  pe_cmd_t cmd;
  load_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS)) dut (.*);

  function automatic f64_t word(logic [AW-1:0] a); return {a, ~a}; endfunction

  // memory with random grant and fixed latency
  logic              pv [RD_LAT];
  logic [META_W-1:0] pt [RD_LAT];
  logic [AW-1:0]     pa [RD_LAT];
  int                reads = 0;
  always @(negedge clk) mem_gnt = mem_req && ($urandom_range(0, 3) != 0);
  always_ff @(posedge clk) begin
    pv[0] <= mem_req && mem_gnt; pt[0] <= mem_tag; pa[0] <= mem_addr;
    for (int i = 1; i < RD_LAT; i++) begin pv[i] <= pv[i-1]; pt[i] <= pt[i-1]; pa[i] <= pa[i-1]; end
    if (mem_req && mem_gnt) reads++;
  end
  assign rsp_v = pv[RD_LAT-1];
  assign rsp_tag = pt[RD_LAT-1];
  assign rsp_data = word(pa[RD_LAT-1]);

  // C buffer model
  f64_t cb [NUM_PE][2][ROWS*SJ];
  int   writes = 0;
  always @(posedge clk) if (cmd.c_we) begin
    cb[cmd.c_pe][cmd.c_bank][cmd.c_addr] <= cmd.c_zero ? 64'd0 : cmd.wdata;
    writes++;
  end

  int checks = 0, failures = 0;

  task automatic block(int rows, int cols, bit bank, bit bz, int cadr);
    blk_desc_t d;
    int w0, r0;
    d = '{a_addr: 0, b_addr: 0, c_addr: AW'(cadr), rows: rows, cols: cols,
          ieff: Q_W'((rows + NUM_PE - 1) / NUM_PE), bank: bank, last: 0};
    beta_zero = bz;
    w0 = writes; r0 = reads;
    @(negedge clk) begin desc_in = d; desc_in_v = 1; end
    @(posedge clk); while (!desc_in_rdy) @(posedge clk);
    @(negedge clk) desc_in_v = 0;
    while (!desc_out_v) @(negedge clk);
    desc_out_rdy = 1;
    @(negedge clk) desc_out_rdy = 0;
    checks++;
    if (desc_out !== d || writes - w0 != rows * cols || (bz && reads != r0) || (!bz && reads - r0 != rows * cols)) begin
      failures++;
      $display("FAIL: block %0dx%0d: %0d writes %0d reads", rows, cols, writes - w0, reads - r0);
    end
    for (int j = 0; j < cols; j++)
      for (int r = 0; r < rows; r++) begin
        f64_t e;
        e = bz ? 64'd0 : word(AW'(cadr + r + j * ldc));
        checks++;
        if (cb[r % NUM_PE][bank][j * ROWS + r / NUM_PE] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL: C'(%0d,%0d)", r, j);
        end
      end
  endtask

  initial begin
    desc_in_v = 0; desc_out_rdy = 0; bank_free = 0; beta_zero = 0; ldc = 11; desc_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    block(6, 4, 0, 0, 100);
    block(5, 3, 1, 0, 300);
    // set 0 is still busy: the next block for set 0 must wait for bank_free
    @(negedge clk) begin
      desc_in = '{a_addr: 0, b_addr: 0, c_addr: 500, rows: 1, cols: 1, ieff: 1, bank: 0, last: 0};
      desc_in_v = 1;
    end
    repeat (10) begin
      @(posedge clk); #1;
      checks++;
      if (desc_in_rdy) begin failures++; $display("FAIL: busy set accepted"); end
    end
    @(negedge clk) begin desc_in_v = 0; bank_free = 2'b11; end
    @(negedge clk) bank_free = 0;
    block(1, 1, 0, 0, 500);
    bank_free = 2'b11; @(negedge clk) bank_free = 0;
    block(4, 2, 1, 1, 700);
    bank_free = 2'b11; @(negedge clk) bank_free = 0;
    block(6, 4, 0, 1, 900);
    bank_free = 2'b11; @(negedge clk) bank_free = 0;
    block(2, 3, 1, 0, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
