// tb_gemm_pe: one processing element (PE index 1, 4 rows, 4 columns) driven
// directly with command words. It writes both A buffer sets and both C buffer
// sets (and commands for another PE, which must be ignored), issues
// multiply-adds with random operands, then reads every C word back. Checks:
// C words equal round(A*B) + C computed in IEEE double arithmetic (several
// accumulations per word, spaced 13 cycles apart, and ones into both sets);
// a read answer leaves rd_out exactly one cycle after the read command;
// rd_in is forwarded with one cycle delay; cmd_out is cmd_in one cycle late;
// the multiply-add result is written back 12 cycles after its command.
`timescale 1ns/1ps
module tb_gemm_pe;
  import gemm_pkg::*;
  localparam int ROWS = 4, SJ = 4, CD = ROWS * SJ, ME = 1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  pe_cmd_t cmd_in, cmd_out, cmd_prev;
  pe_rd_t  rd_in, rd_out, rd_in_prev;
  gemm_pe #(.PE_ID(ME), .ROWS(ROWS), .SJ(SJ)) dut (.*);

  logic [63:0] am [2][ROWS];
  logic [63:0] cm [2][CD];
  int checks = 0, failures = 0;

  function automatic logic [63:0] rnd_double();
    logic [63:0] v;
    v[63]    = 1'($urandom_range(0, 1));
    v[62:52] = 11'(1023 + $urandom_range(0, 8) - 4);
    v[51:0]  = {20'($urandom), 32'($urandom)};
    return v;
  endfunction

  task automatic send(pe_cmd_t c);
    @(negedge clk);
    cmd_prev   = cmd_in;
    rd_in_prev = rd_in;
    cmd_in = c;
    rd_in  = '{v: 1'($urandom_range(0, 1)), data: {$urandom, $urandom}};
    // forwarding of the previous cycle's command and read data
    checks++;
    if (cmd_out !== cmd_prev) begin failures++; $display("FAIL: cmd_out not cmd_in delayed"); end
  endtask

  // latency of the write-back: a MAC issued at cycle t must write at t+12
  longint cyc = 0, mac_t = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd_in.mac_v && mac_t == -1) mac_t = cyc;
    if (dut.wb_en && mac_t >= 0) begin
      checks++;
      if (cyc - mac_t != MAC_LAT + 1) begin failures++; $display("FAIL: write-back after %0d cycles", cyc - mac_t); end
      mac_t = -2;
    end
  end

  initial begin
    pe_cmd_t c;
    cmd_in = '0; rd_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // fill A and C; every other write is aimed at PE 0 and must not land
    for (int s = 0; s < 2; s++) begin
      for (int q = 0; q < ROWS; q++) begin
        c = '0; c.a_we = 1; c.a_pe = ME; c.a_bank = 1'(s); c.a_q = Q_W'(q); c.wdata = rnd_double();
        am[s][q] = c.wdata; send(c);
        c.a_pe = 0; c.wdata = rnd_double(); send(c);
      end
      for (int a = 0; a < CD; a++) begin
        c = '0; c.c_we = 1; c.c_pe = ME; c.c_bank = 1'(s); c.c_addr = LA_W'(a);
        c.c_zero = (a % 5 == 0); c.wdata = rnd_double();
        cm[s][a] = c.c_zero ? 64'd0 : c.wdata; send(c);
        c.c_pe = 2; c.c_zero = 0; c.wdata = rnd_double(); send(c);
      end
    end
    // three rounds of multiply-adds over every C word of both sets
    for (int round = 0; round < 3; round++)
      for (int a = 0; a < CD; a++)
        for (int s = 0; s < 2; s++) begin
          real pr;
          c = '0; c.mac_v = 1; c.mac_abank = 1'($urandom_range(0, 1)); c.mac_q = Q_W'($urandom_range(0, ROWS - 1));
          c.mac_cbank = 1'(s); c.mac_caddr = LA_W'(a); c.b = rnd_double();
          pr = $bitstoreal(am[c.mac_abank][c.mac_q]) * $bitstoreal(c.b);
          cm[s][a] = $realtobits(pr + $bitstoreal(cm[s][a]));
          send(c);
        end
    repeat (MAC_LAT + 2) send('0);
    // read back; the answer must come out one cycle after the command
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < CD; a++) begin
        c = '0; c.r_v = 1; c.r_pe = ME; c.r_bank = 1'(s); c.r_addr = LA_W'(a);
        send(c);
        @(posedge clk); #1;
        checks++;
        if (!rd_out.v || rd_out.data !== cm[s][a]) begin
          failures++;
          if (failures < 10) $display("FAIL: C[%0d][%0d] got %b %h exp %h", s, a, rd_out.v, rd_out.data, cm[s][a]);
        end
        // a read for another PE: rd_in must pass through instead
        c.r_pe = 0; send(c);
        @(posedge clk); #1;
        checks++;
        if (rd_out !== rd_in) begin failures++; $display("FAIL: rd_in not forwarded"); end
      end
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
