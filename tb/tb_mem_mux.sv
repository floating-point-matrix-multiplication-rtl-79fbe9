// tb_mem_mux: random requests from the exec, store and load units. Checks
// each cycle that exactly the highest-priority requester (exec, then store,
// then load) is granted, that the memory port carries its address and data,
// and that every read answer (memory latency 3) is returned to the unit that
// asked, with the tag it gave, exactly 3 cycles later.
`timescale 1ns/1ps
module tb_mem_mux;
  import gemm_pkg::*;
  localparam int RD_LAT = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ex_req, ex_gnt, ex_rsp_v, st_req, st_gnt, ld_req, ld_gnt, ld_rsp_v;
  logic [AW-1:0] ex_addr, st_addr, ld_addr;
  logic [META_W-1:0] ex_tag, ld_tag, rsp_tag;
  f64_t st_data, rsp_data;
  logic mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  f64_t mem_rd_data, mem_wr_data;
  mem_mux #(.RD_LAT(RD_LAT)) dut (.*);

  // memory answers with a function of the address
  f64_t rp [RD_LAT];
  always_ff @(posedge clk) begin
    rp[0] <= {32'hABCD0000, mem_rd_addr} ^ 64'h1234;
    for (int i = 1; i < RD_LAT; i++) rp[i] <= rp[i-1];
  end
  assign mem_rd_data = rp[RD_LAT-1];

  typedef struct { int who; logic [META_W-1:0] tag; logic [AW-1:0] addr; } rq_t;
  rq_t pend [RD_LAT];
  int checks = 0, failures = 0;

  initial begin
    ex_req = 0; st_req = 0; ld_req = 0;
    for (int i = 0; i < RD_LAT; i++) pend[i].who = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // answers for requests made RD_LAT cycles ago
      checks++;
      if (ex_rsp_v !== (pend[RD_LAT-1].who == 1) || ld_rsp_v !== (pend[RD_LAT-1].who == 3) ||
          ((pend[RD_LAT-1].who == 1 || pend[RD_LAT-1].who == 3) && (rsp_tag !== pend[RD_LAT-1].tag ||
            rsp_data !== ({32'hABCD0000, pend[RD_LAT-1].addr} ^ 64'h1234)))) begin
        failures++;
        if (failures < 10) $display("FAIL: answer routing at %0d", i);
      end
      for (int j = RD_LAT - 1; j > 0; j--) pend[j] = pend[j-1];
      ex_req = ($urandom_range(0, 2) == 0); ex_addr = $urandom; ex_tag = $urandom;
      st_req = ($urandom_range(0, 1) == 0); st_addr = $urandom; st_data = {$urandom, $urandom};
      ld_req = ($urandom_range(0, 1) == 0); ld_addr = $urandom; ld_tag = $urandom;
      #1;
      checks++;
      if (ex_req) begin
        pend[0] = '{1, ex_tag, ex_addr};
        if (!ex_gnt || st_gnt || ld_gnt || !mem_rd_en || mem_wr_en || mem_rd_addr !== ex_addr) failures++;
      end else if (st_req) begin
        pend[0] = '{2, 0, 0};
        if (ex_gnt || !st_gnt || ld_gnt || mem_rd_en || !mem_wr_en ||
            mem_wr_addr !== st_addr || mem_wr_data !== st_data) failures++;
      end else if (ld_req) begin
        pend[0] = '{3, ld_tag, ld_addr};
        if (ex_gnt || st_gnt || !ld_gnt || !mem_rd_en || mem_wr_en || mem_rd_addr !== ld_addr) failures++;
      end else begin
        pend[0] = '{0, 0, 0};
        if (ex_gnt || st_gnt || ld_gnt || mem_rd_en || mem_wr_en) failures++;
      end
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
