// Testbench for rr_arbiter: random request vectors; the grant must be the
// first requester at or after the position following the last winner.
`timescale 1ns/1ps
module tb_rr_arbiter;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(20000)

  logic       rst_n, advance, gv;
  logic [7:0] req, grant;
  logic [2:0] gidx;
  int         ptr, exp_i;
  int         served [8];

  rr_arbiter #(.N(8)) dut (.clk, .rst_n, .req, .advance, .grant, .grant_idx(gidx), .grant_valid(gv));

  initial begin
    rst_n = 0; req = 0; advance = 0; ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req = (n < 2000) ? 8'($urandom) : 8'hFF;
      advance = ($urandom % 4) != 0;
      #1;
      exp_i = -1;
      for (int k = 0; k < 8; k++) if (exp_i < 0 && req[(ptr + k) % 8]) exp_i = (ptr + k) % 8;
      `CHECK(gv == (req != 0), "grant valid")
      if (exp_i >= 0) begin
        `CHECK(gidx == 3'(exp_i) && grant == 8'(1 << exp_i), "round robin winner")
        if (advance) begin ptr = (exp_i + 1) % 8; served[exp_i]++; end
      end else `CHECK(grant == 0, "no grant without request")
    end
    for (int i = 0; i < 8; i++) `CHECK(served[i] > 100, "every requester served")
    `TB_FINISH
  end
endmodule
