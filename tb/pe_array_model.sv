// pe_array_model: behavioural model of the linear PE array for testing the
// controller and its units without the real PEs. It holds the A and C buffer
// sets of every PE as arrays and applies each command in the cycle it is
// given: A and C writes, multiply-adds (C = round(A*B) + C in IEEE double
// arithmetic, for every PE at once), and C reads, whose answers appear on rd
// exactly NUM_PE cycles later, as in the real array. It also checks the
// timing rule the real array depends on: a C word must not be read (by a
// multiply-add or the store path) sooner than MAC_LAT+2 cycles after a
// multiply-add read it, and it counts violations in hazards.
`timescale 1ns/1ps
module pe_array_model
  import gemm_pkg::*;
#(
  parameter int NUM_PE = 3,
  parameter int ROWS   = 2,
  parameter int SJ     = 4
) (
  input  logic    clk,
  input  pe_cmd_t cmd,
  output pe_rd_t  rd
);
  localparam int CD = ROWS * SJ;
  logic [63:0] abuf [NUM_PE][2][ROWS];
  logic [63:0] cbuf [NUM_PE][2][CD];
  longint      last_mac [2][CD];
  longint      cyc = 0;
  int          hazards = 0, macs = 0;
  pe_rd_t      dly [NUM_PE];

  initial for (int b = 0; b < 2; b++) for (int a = 0; a < CD; a++) last_mac[b][a] = -1000;

  assign rd = dly[NUM_PE-1];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = NUM_PE - 1; i > 0; i--) dly[i] <= dly[i-1];
    dly[0] <= '0;
    if (cmd.a_we) abuf[cmd.a_pe][cmd.a_bank][cmd.a_q] <= cmd.wdata;
    if (cmd.c_we) cbuf[cmd.c_pe][cmd.c_bank][cmd.c_addr] <= cmd.c_zero ? 64'd0 : cmd.wdata;
    if (cmd.mac_v) begin
      macs++;
      if (cyc - last_mac[cmd.mac_cbank][cmd.mac_caddr] < MAC_LAT + 2) hazards++;
      last_mac[cmd.mac_cbank][cmd.mac_caddr] = cyc;
      for (int p = 0; p < NUM_PE; p++) begin
        real pr;
        pr = $bitstoreal(abuf[p][cmd.mac_abank][cmd.mac_q]) * $bitstoreal(cmd.b);
        cbuf[p][cmd.mac_cbank][cmd.mac_caddr] <=
          $realtobits(pr + $bitstoreal(cbuf[p][cmd.mac_cbank][cmd.mac_caddr]));
      end
    end
    if (cmd.r_v) begin
      if (cyc - last_mac[cmd.r_bank][cmd.r_addr] < MAC_LAT + 2) hazards++;
      dly[0] <= '{v: 1'b1, data: cbuf[cmd.r_pe][cmd.r_bank][cmd.r_addr]};
    end
  end
endmodule
