// Testbench for dual_write_fifo: random writes on both ports (port 0 first)
// and reads against a queue model; full must rise with fewer than two
// free slots.
`timescale 1ns/1ps
module tb_dual_write_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic        rst_n, wr0_en, wr1_en, rd_en, empty, full;
  logic [39:0] wr0_data, wr1_data, rd_data;
  logic [3:0]  count;
  logic [39:0] q [$];
  int          doubles, fulls;
  bit          was_full;

  dual_write_fifo #(.WIDTH(40), .DEPTH(8)) dut (.clk, .rst_n, .wr0_en, .wr0_data, .wr1_en, .wr1_data,
    .rd_en, .rd_data, .empty, .full, .count);

  initial begin
    rst_n = 0; wr0_en = 0; wr1_en = 0; rd_en = 0; wr0_data = 0; wr1_data = 0; doubles = 0; fulls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      `CHECK(count == 4'(q.size()), "count")
      `CHECK(empty == (q.size() == 0), "empty")
      `CHECK(full == (q.size() > 6), "full")
      if (q.size() != 0) `CHECK(rd_data == q[0], "head")
      if (full) fulls++;
      wr0_en = ($urandom % 100) < 45;
      wr1_en = ($urandom % 100) < 45;
      rd_en  = ($urandom % 100) < ((n / 300) % 2 ? 40 : 90);
      wr0_data = {8'($urandom), $urandom};
      wr1_data = {8'($urandom), $urandom};
      was_full = (q.size() > 6);
      @(posedge clk); #1;
      if (rd_en && q.size() != 0) void'(q.pop_front());
      if (!was_full) begin
        if (wr0_en) q.push_back(wr0_data);
        if (wr1_en) q.push_back(wr1_data);
        if (wr0_en && wr1_en) doubles++;
      end
    end
    `CHECK(doubles > 100 && fulls > 0, "double writes and full reached")
    `TB_FINISH
  end
endmodule
