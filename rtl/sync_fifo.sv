// sync_fifo: synchronous first-in first-out buffer with show-ahead output.
// dout is the oldest entry whenever empty is low; pop removes it. push and
// pop may happen in the same cycle. count gives the fill level. Used for the
// store path (addresses and results on their way to system memory) and for
// the B stream of the exec unit. Pushing when full or popping when empty is
// a usage error and is flagged by assertions.
module sync_fifo #(
  parameter type         T     = logic [63:0],
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  T             din,
  input  logic         pop,
  output T             dout,
  output logic         empty,
  output logic         full,
  output logic [PW:0]  count
);

  T              mem [DEPTH];
  logic [PW-1:0] wp, rp;

  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
