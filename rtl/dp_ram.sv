// dp_ram: simple dual-port RAM, one synchronous write port and one read port
// with a registered output (read data appears the cycle after rd_en). A read
// and a write of the same address in the same cycle return the old contents.
// Used for the A and C buffers inside each processing element; maps onto FPGA
// block RAM.
module dp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW_  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW_-1:0]   waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW_-1:0]   raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
