// Testbench for tracking_fifo: random push/pop against a queue model,
// checking dout, full and empty.
`timescale 1ns/1ps
module tb_tracking_fifo;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic        rst_n, push, pop, full, empty;
  logic [32:0] din, dout;
  logic [32:0] q [$];
  int          fulls;
  bit          was_full;

  tracking_fifo #(.WIDTH(33), .DEPTH(8)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty);

  initial begin
    rst_n = 0; push = 0; pop = 0; din = 0; fulls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      `CHECK(full == (q.size() == 8), "full")
      `CHECK(empty == (q.size() == 0), "empty")
      if (q.size() != 0) `CHECK(dout == q[0], "head")
      if (full) fulls++;
      push = ($urandom % 100) < ((n / 400) % 2 ? 75 : 30);
      pop  = ($urandom % 100) < ((n / 400) % 2 ? 30 : 75);
      din  = {1'($urandom), $urandom};
      was_full = (q.size() == 8);
      @(posedge clk); #1;
      if (pop && q.size() != 0) void'(q.pop_front());
      if (push && !was_full) q.push_back(din);
    end
    `CHECK(fulls > 0, "full case reached")
    `TB_FINISH
  end
endmodule
