// Testbench for partition_alloc: claims nodes from random partitions on
// both ports and checks node/page sequences (64 nodes per page, page =
// partition*15 + n) and that a partition stops after 15 pages.
`timescale 1ns/1ps
module tb_partition_alloc;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic rst_n;
  logic [1:0][3:0] part;
  logic [1:0] take, avail;
  logic [1:0][7:0] page;
  logic [1:0][5:0] node;
  int used [16];
  int exhausted;

  partition_alloc dut (.clk, .rst_n, .part, .take, .avail, .page_o(page), .node_o(node));

  initial begin
    rst_n = 0; part = 0; take = 0; exhausted = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      part[0] = 4'($urandom % 4);        // partitions 0..3 get exhausted
      part[1] = 4'($urandom % 16);
      if (part[1] == part[0]) part[1] = part[0] + 4'd1;
      take = 2'($urandom);
      #1;
      for (int p = 0; p < 2; p++) begin
        int u;
        u = used[part[p]];
        `CHECK(avail[p] == (u < 15 * 64), "avail")
        if (u < 15 * 64) `CHECK(page[p] == 8'(part[p] * 15 + u / 64) && node[p] == 6'(u % 64), "next node")
      end
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++)
        if (take[p] && used[part[p]] < 15 * 64) used[part[p]]++;
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) if (used[i] == 15 * 64) exhausted++;
    `CHECK(exhausted == 4, "partitions exhausted")
    `TB_FINISH
  end
endmodule
