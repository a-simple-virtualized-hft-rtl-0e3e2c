// Testbench for mmu_fifo: random writes and reads against a queue model,
// checking show-ahead data, empty and count, and that a full FIFO drops.
`timescale 1ns/1ps
module tb_mmu_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic         rst_n, wr_en, rd_en, empty;
  logic [120:0] wr_data, rd_data;
  logic [3:0]   count;
  logic [120:0] q [$];
  int           fulls;

  mmu_fifo #(.WIDTH(121), .DEPTH(8)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .count);

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = 0; fulls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      `CHECK(count == 4'(q.size()), "count")
      `CHECK(empty == (q.size() == 0), "empty")
      if (q.size() != 0) `CHECK(rd_data == q[0], "head data")
      wr_en = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      rd_en = ($urandom % 100) < ((n / 500) % 2 ? 30 : 70);
      wr_data = {$urandom, $urandom, $urandom, 25'($urandom)};
      @(posedge clk); #1;
      if (rd_en && q.size() != 0) void'(q.pop_front());
      if (wr_en && (q.size() < 8)) q.push_back(wr_data);
      else if (wr_en) fulls++;
    end
    `CHECK(fulls > 0, "full case reached")
    `TB_FINISH
  end
endmodule
