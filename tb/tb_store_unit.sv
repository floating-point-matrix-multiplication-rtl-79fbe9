// tb_store_unit: the store unit with a model of the PE array's C buffers
// (read answers NUM_PE cycles after the read command, as in the real chain)
// and a memory write port with random grants. For several blocks it checks
// that every element C'(r, j), taken from PE r mod 3 at local address
// j*ROWS + r/3 of the block's set, is written once to c + r + j*ldc, that
// bank_free pulses for the block's set after its last read, and that done
// pulses once, after the last word of the block flagged last.
`timescale 1ns/1ps
module tb_store_unit;
  import gemm_pkg::*;
  localparam int NUM_PE = 3, ROWS = 2, SJ = 4, MEMW = 4096;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [DIM_W-1:0] ldc;
  logic desc_in_v, desc_in_rdy, mem_req, mem_gnt, done;
  blk_desc_t desc_in;
  logic [1:0] bank_free;
  pe_cmd_t cmd;
  pe_rd_t rd;
  logic [AW-1:0] mem_addr;
  f64_t mem_data;
  store_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS), .FDEPTH(8)) dut (.*);

  f64_t cb [NUM_PE][2][ROWS*SJ];
  pe_rd_t dly [NUM_PE];
  always @(posedge clk) begin
    for (int i = NUM_PE - 1; i > 0; i--) dly[i] <= dly[i-1];
    dly[0] <= cmd.r_v ? '{v: 1'b1, data: cb[cmd.r_pe][cmd.r_bank][cmd.r_addr]} : '0;
  end
  assign rd = dly[NUM_PE-1];

  f64_t mem [MEMW];
  int   nwr [MEMW];
  always @(negedge clk) mem_gnt = mem_req && ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (mem_req && mem_gnt) begin
    mem[mem_addr % MEMW] <= mem_data;
    nwr[mem_addr % MEMW]++;
  end

  int checks = 0, failures = 0, frees [2], dones = 0;
  always @(posedge clk) if (!rst) begin
    if (bank_free[0]) frees[0]++;
    if (bank_free[1]) frees[1]++;
    if (done) dones++;
  end

  task automatic block(int rows, int cols, bit bank, int cadr, bit last);
    blk_desc_t d;
    int f0;
    f0 = frees[bank];
    for (int p = 0; p < NUM_PE; p++) for (int a = 0; a < ROWS*SJ; a++) cb[p][bank][a] = {$urandom, $urandom};
    for (int i = 0; i < MEMW; i++) nwr[i] = 0;
    d = '{a_addr: 0, b_addr: 0, c_addr: AW'(cadr), rows: rows, cols: cols,
          ieff: Q_W'((rows + NUM_PE - 1) / NUM_PE), bank: bank, last: last};
    @(negedge clk) begin desc_in = d; desc_in_v = 1; end
    @(posedge clk); while (!desc_in_rdy) @(posedge clk);
    @(negedge clk) desc_in_v = 0;
    while (!desc_in_rdy) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++;
    if (frees[bank] != f0 + 1) begin failures++; $display("FAIL: bank_free count"); end
    for (int j = 0; j < cols; j++)
      for (int r = 0; r < rows; r++) begin
        int ad;
        ad = cadr + r + j * ldc;
        checks++;
        if (nwr[ad] != 1 || mem[ad] !== cb[r % NUM_PE][bank][j * ROWS + r / NUM_PE]) begin
          failures++;
          if (failures < 10) $display("FAIL: C'(%0d,%0d) writes %0d", r, j, nwr[ad]);
        end
      end
  endtask

  initial begin
    desc_in_v = 0; ldc = 9; desc_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    block(6, 4, 0, 100, 0);
    block(5, 3, 1, 400, 0);
    block(1, 1, 0, 800, 0);
    checks++;
    if (dones != 0) begin failures++; $display("FAIL: early done"); end
    block(4, 4, 1, 1200, 1);
    checks++;
    if (dones != 1) begin failures++; $display("FAIL: done pulsed %0d times", dones); end
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
