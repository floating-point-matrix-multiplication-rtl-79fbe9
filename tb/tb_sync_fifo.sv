// tb_sync_fifo: random push/pop traffic against a queue model. Checks the
// show-ahead output, empty, full and count every cycle, including push and
// pop in the same cycle while full.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int D = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [3:0] count;
  sync_fifo #(.T(logic [15:0]), .DEPTH(D)) dut (.*);

  logic [15:0] q [$];
  int checks = 0, failures = 0;

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare state before this cycle's operation
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || count !== 4'(q.size()) ||
          (q.size() != 0 && dout !== q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL: size %0d empty %b full %b count %0d dout %h", q.size(), empty, full, count, dout);
      end
      pop  = (q.size() != 0) && ($urandom_range(0, 2) != 0);
      push = ((q.size() < D) || pop) && ($urandom_range(0, 2) != 0);
      din  = 16'($urandom);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
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
