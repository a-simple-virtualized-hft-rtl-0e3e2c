// Testbench for global_counter: zero after reset, then +1 every clock.
`timescale 1ns/1ps
module tb_global_counter;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(5000)

  logic        rst_n;
  logic [31:0] count, prev;

  global_counter dut (.clk, .rst_n, .count);

  initial begin
    rst_n = 0;
    repeat (2) @(negedge clk);
    `CHECK(count == 0, "reset value")
    rst_n = 1;
    @(negedge clk); prev = count;
    `CHECK(count == 1, "first count")
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      `CHECK(count == prev + 1, "increment")
      prev = count;
    end
    `TB_FINISH
  end
endmodule
