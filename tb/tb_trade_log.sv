// Testbench for trade_log: fills the log with random entries while software
// reads interleave (reads hold trade_in_ready low), reads every entry back,
// checks count, the overflow flag once full, and clear. Full depth 8704.
`timescale 1ns/1ps
module tb_trade_log;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)

  localparam int DEPTH = 8704;
  logic        rst_n, iv, ir, re, ovf, clr;
  logic [63:0] id, rd;
  logic [13:0] addr, cnt;
  logic [63:0] model [$];

  trade_log #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .trade_in_valid(iv), .trade_in_data(id),
    .trade_in_ready(ir), .sw_re(re), .sw_addr(addr), .sw_rdata(rd), .sw_count(cnt),
    .sw_overflow(ovf), .sw_clear(clr));

  initial begin
    rst_n = 0; iv = 0; id = 0; re = 0; addr = 0; clr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(cnt == 0 && !ovf, "empty after reset")
    while (model.size() < DEPTH + 10) begin
      iv = 1; id = {$urandom, $urandom};
      re = (model.size() > 0) && ($urandom % 8 == 0);
      addr = re ? 14'($urandom % model.size()) : '0;
      #1;
      `CHECK(ir == !re, "port busy during read")
      @(posedge clk); #1;
      if (re) `CHECK(rd == model[addr], "read during fill")
      if (!re) model.push_back(id);
      @(negedge clk);
    end
    iv = 0; re = 0;
    `CHECK(cnt == 14'(DEPTH), "count saturates at DEPTH")
    `CHECK(ovf, "overflow set")
    for (int i = 0; i < DEPTH; i += 7) begin
      re = 1; addr = 14'(i); @(negedge clk);
      `CHECK(rd == model[i], "read back")
    end
    re = 0; clr = 1; @(negedge clk); clr = 0;
    `CHECK(cnt == 0 && !ovf, "clear")
    `TB_FINISH
  end
endmodule
