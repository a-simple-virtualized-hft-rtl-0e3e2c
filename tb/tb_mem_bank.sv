// Testbench for mem_bank: random node writes and reads over all 60 pages
// against a model keyed by (page, node), checking data, the 3-clock write
// and 4-clock read latency and mem_busy.
`timescale 1ns/1ps
module tb_mem_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic        rst_n, we, re, rvalid, wdone, busy;
  logic [31:0] addr;
  logic [85:0] wdata, rdata;
  logic [85:0] model [int];
  int          lat, reads;

  mem_bank dut (.clk, .rst_n, .mem_addr(addr), .mem_we(we), .mem_re(re), .mem_wdata(wdata),
    .mem_rdata(rdata), .mem_rdata_valid(rvalid), .mem_wdone(wdone), .mem_busy(busy));

  function automatic logic [31:0] mkaddr(int page, int node);
    return {11'd0, 8'(page), 3'd0, 6'(node), 4'd0};
  endfunction

  initial begin
    rst_n = 0; we = 0; re = 0; addr = 0; wdata = 0; reads = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int page, node, key;
      bit do_wr;
      @(negedge clk);
      `CHECK(!busy, "idle between requests")
      page = ($urandom % 60) * 4 + 2;   // pages of bank 2
      node = (n < 2000) ? $urandom % 64 : $urandom % 4;
      key  = page * 64 + node;
      do_wr = !model.exists(key) || ($urandom % 2);
      addr = mkaddr(page, node);
      if (do_wr) begin
        we = 1; wdata = {22'($urandom), $urandom, $urandom}; model[key] = wdata;
      end else re = 1;
      @(negedge clk); we = 0; re = 0; lat = 1;
      while (!(wdone || rvalid)) begin
        `CHECK(busy, "busy during access")
        @(negedge clk); lat++;
        if (lat > 10) break;
      end
      if (do_wr) `CHECK(wdone && lat == 3, "write done after 3 clocks")
      else begin
        `CHECK(rvalid && lat == 4, "read data after 4 clocks")
        `CHECK(rdata == model[key], "read data")
        reads++;
      end
    end
    `CHECK(reads > 500, "reads done")
    `TB_FINISH
  end
endmodule
