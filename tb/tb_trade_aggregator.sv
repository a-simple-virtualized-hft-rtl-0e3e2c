// Testbench for trade_aggregator: eight engine models offer random trades
// with random gaps; the log side is ready at random. Every trade must come
// out once, compressed to {6'b0, qty[6:0], engine, price, ts}, in per-engine
// order, and a busy engine may not wait more than seven other grants.
`timescale 1ns/1ps
module tb_trade_aggregator;
  import hft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic rst_n;
  logic [7:0] ev, er, taken;
  logic [7:0][85:0] ed;
  logic ov, ordy;
  logic [63:0] od;
  logic [63:0] exp_q [8][$];
  int          sent, recvd, wait_cnt [8];

  trade_aggregator #(.NUM_ENG(8)) dut (.clk, .rst_n, .eng_trade_valid(ev), .eng_trade_data(ed),
    .eng_trade_ready(er), .trade_out_valid(ov), .trade_out_data(od), .trade_out_ready(ordy));

  function automatic trade_t rnd_trade();
    trade_t t;
    t.bid_oid = 11'($urandom); t.ask_oid = 11'($urandom);
    t.qty = 16'($urandom % 200 + 1); t.ts = $urandom; t.price = 16'($urandom);
    return t;
  endfunction

  initial begin
    rst_n = 0; ev = 0; ed = '0; ordy = 0; sent = 0; recvd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      for (int e = 0; e < 8; e++)
        if (!ev[e] && n < 5000 && ($urandom % 3 == 0)) begin
          trade_t t;
          t = rnd_trade();
          ev[e] = 1; ed[e] = t; sent++;
          exp_q[e].push_back({6'b0, t.qty[6:0], 3'(e), t.price, t.ts});
        end
      ordy = ($urandom % 4) != 0;
      #1;
      if (ov && ordy) begin
        int e;
        e = int'(od[50:48]);
        `CHECK(exp_q[e].size() > 0 && od == exp_q[e][0], "compressed trade, engine order")
        if (exp_q[e].size() > 0) void'(exp_q[e].pop_front());
        recvd++;
      end
      for (int e = 0; e < 8; e++) begin
        if (ev[e] && !er[e]) wait_cnt[e]++; else wait_cnt[e] = 0;
        `CHECK(wait_cnt[e] < 40, "no starvation")
      end
      taken = er;
      @(posedge clk); #1;
      for (int e = 0; e < 8; e++) if (taken[e]) ev[e] = 0;
      @(negedge clk);
    end
    `CHECK(recvd == sent && sent > 1000, "every trade delivered once")
    `TB_FINISH
  end
endmodule
