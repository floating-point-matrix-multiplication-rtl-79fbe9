// tb_dp_ram: checks the simple dual-port RAM against an array model:
// random writes and reads, read data one cycle after the read request,
// read-during-write of the same address returns the old word, and the output
// holds its value while no read is requested.
`timescale 1ns/1ps
module tb_dp_ram;
  localparam int W = 64, D = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] model [D];
  logic [W-1:0] expect_q;
  logic         check_q = 0;
  int checks = 0, failures = 0;

  // rdata is compared half a cycle after each edge
  always @(negedge clk) begin
    if (check_q) begin
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL: got %h exp %h", rdata, expect_q);
      end
    end
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // initialise every word
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      #1;
      we = $urandom_range(0, 1);
      re = $urandom_range(0, 2) != 0;
      waddr = 6'($urandom_range(0, D - 1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 6'($urandom_range(0, D - 1));
      wdata = {$urandom, $urandom};
      if (re) expect_q = model[raddr];      // old contents on a clash
      if (re) check_q = 1;
      if (we) model[waddr] = wdata;
    end
    @(negedge clk) begin we = 0; re = 0; end
    @(negedge clk) check_q = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
