// Testbench for bram_dp_256x32: simultaneous writes and reads on the two
// ports against an array model, checking the registered read.
`timescale 1ns/1ps
module tb_bram_dp_256x32;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic        we, re;
  logic [7:0]  waddr, raddr;
  logic [31:0] wdata, rdata, model [256];

  bram_dp_256x32 dut (.clk, .we, .re, .waddr, .raddr, .wdata, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] ra;
      @(negedge clk);
      we = 1; waddr = 8'($urandom); wdata = $urandom;
      re = 1; raddr = 8'($urandom);
      if (raddr == waddr) raddr = raddr + 8'd1;
      ra = raddr;
      model[waddr] = wdata;
      @(negedge clk); we = 0; re = 0;
      `CHECK(rdata == model[ra], "read port")
    end
    `TB_FINISH
  end
endmodule
