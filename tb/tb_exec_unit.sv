// tb_exec_unit: the exec unit with a memory model (read latency 1, full
// priority as in the controller) and the behavioural PE array model. Three
// blocks run back to back in alternating C buffer sets: a full 12 x 8 block
// with k = 10, a ragged 7 x 5 block with alpha = -1, and a 2 x 1 block whose
// iterations need idle padding. When each descriptor comes out, every C word
// of its set is compared bit for bit with C + sum over kk of round(alpha*a*b)
// accumulated in the same order in IEEE double arithmetic. Also checked: no
// C word is reread sooner than the multiply-add allows, the descriptor comes
// out unchanged, and the full block (i = 4 rows per PE, S = 8, so
// iS = 32 >= iP + S = 20) finishes within k*iS cycles plus the first column
// and row load and the drain, i.e. the A-column loads overlap computation.
`timescale 1ns/1ps
module tb_exec_unit;
  import gemm_pkg::*;
  localparam int NUM_PE = 3, ROWS = 4, SJ = 8, MEMW = 4096;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [DIM_W-1:0] k, lda, ldb;
  logic alpha_neg;
  logic desc_in_v, desc_in_rdy, desc_out_v, desc_out_rdy;
  blk_desc_t desc_in, desc_out;
  logic mem_req, mem_gnt, rsp_v;
  logic [AW-1:0] mem_addr;
  logic [META_W-1:0] mem_tag, rsp_tag;
  f64_t rsp_data;
  pe_cmd_t cmd;
  exec_unit #(.NUM_PE(NUM_PE), .ROWS(ROWS), .SJ(SJ)) dut (.*);
  pe_array_model #(.NUM_PE(NUM_PE), .ROWS(ROWS), .SJ(SJ)) u_pes (.clk, .cmd, .rd());

  f64_t mem [MEMW];
  assign mem_gnt = mem_req;
  always_ff @(posedge clk) begin
    rsp_v    <= mem_req;
    rsp_tag  <= mem_tag;
    rsp_data <= mem[mem_addr % MEMW];
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  function automatic f64_t rnd_double();
    f64_t v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 8) - 4);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  f64_t c0 [2][NUM_PE][ROWS*SJ];
  task automatic init_set(bit bank);
    for (int p = 0; p < NUM_PE; p++)
      for (int a = 0; a < ROWS*SJ; a++) begin
        c0[bank][p][a] = rnd_double();
        u_pes.cbuf[p][bank][a] = c0[bank][p][a];
      end
  endtask

  task automatic feed(blk_desc_t d);
    @(negedge clk) begin desc_in = d; desc_in_v = 1; end
    @(posedge clk); while (!desc_in_rdy) @(posedge clk);
    @(negedge clk) desc_in_v = 0;
  endtask

  task automatic expect_out(blk_desc_t d);
    while (!desc_out_v) @(negedge clk);
    checks++;
    if (desc_out !== d) begin failures++; $display("FAIL: descriptor changed"); end
    for (int j = 0; j < d.cols; j++)
      for (int r = 0; r < d.rows; r++) begin
        real acc, av, pr;
        int p, la;
        p = r % NUM_PE; la = j * ROWS + r / NUM_PE;
        acc = $bitstoreal(c0[d.bank][p][la]);
        for (int kk = 0; kk < k; kk++) begin
          av = $bitstoreal(mem[d.a_addr + r + kk * lda]);
          if (alpha_neg) av = -av;
          pr = av * $bitstoreal(mem[d.b_addr + kk + j * ldb]);
          acc = pr + acc;
        end
        checks++;
        if (u_pes.cbuf[p][d.bank][la] !== $realtobits(acc)) begin
          failures++;
          if (failures < 10) $display("FAIL: C'(%0d,%0d) got %h exp %h", r, j, u_pes.cbuf[p][d.bank][la], $realtobits(acc));
        end
      end
    @(negedge clk);
  endtask

  initial begin
    blk_desc_t d0, d1, d2;
    longint t0, t_full;
    desc_in_v = 0; desc_out_rdy = 1; desc_in = '0;
    k = 10; lda = 40; ldb = 30; alpha_neg = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = rnd_double();
    repeat (3) @(negedge clk);
    rst = 0;
    d0 = '{a_addr: 0,    b_addr: 1000, c_addr: 0, rows: 12, cols: 8, ieff: 4, bank: 0, last: 0};
    d1 = '{a_addr: 12,   b_addr: 1240, c_addr: 0, rows: 7,  cols: 5, ieff: 3, bank: 1, last: 0};
    d2 = '{a_addr: 19,   b_addr: 1400, c_addr: 0, rows: 2,  cols: 1, ieff: 1, bank: 0, last: 1};
    init_set(0); init_set(1);
    t0 = cyc;
    feed(d0);
    while (!desc_out_v) @(negedge clk);
    t_full = cyc - t0;
    checks++;
    if (t_full > 10 * 32 + 12 + 8 + (MAC_LAT + 2) + 8) begin
      failures++; $display("FAIL: full block took %0d cycles", t_full);
    end
    expect_out(d0);
    init_set(0);
    alpha_neg = 1;
    feed(d1);
    expect_out(d1);
    feed(d2);
    expect_out(d2);
    checks++;
    if (u_pes.hazards != 0) begin failures++; $display("FAIL: %0d hazards", u_pes.hazards); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
