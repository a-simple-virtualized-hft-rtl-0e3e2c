// Testbench for priv_bram: random writes and reads against an array model,
// checking the one-clock read latency.
`timescale 1ns/1ps
module tb_priv_bram;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic        we, re;
  logic [5:0]  addr;
  logic [85:0] wdata, rdata, model [64];
  bit          written [64];

  priv_bram #(.WIDTH(86), .DEPTH(64)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  initial begin
    we = 0; re = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = {$urandom, $urandom, 22'($urandom)};
      model[i] = wdata; written[i] = 1;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 6'($urandom);
      if ($urandom % 2) begin
        we = 1; re = 0; wdata = {$urandom, $urandom, 22'($urandom)}; model[addr] = wdata;
      end else begin
        logic [5:0] a;
        we = 0; re = 1; a = addr;
        @(negedge clk); re = 0;
        `CHECK(rdata == model[a], "read data")
      end
    end
    `TB_FINISH
  end
endmodule
