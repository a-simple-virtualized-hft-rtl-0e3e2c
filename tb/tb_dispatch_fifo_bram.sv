// Testbench for dispatch_fifo_bram: fill to full, drain with random ready
// and check order, empty/full, the held output while dispatch_en is low,
// one word per clock with a ready consumer, and clear.
`timescale 1ns/1ps
module tb_dispatch_fifo_bram;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  localparam int DEPTH = 1792;
  logic        rst_n, wr_en, full, dispatch_en, out_ready, out_valid, empty, clear;
  logic [31:0] wr_data, out_data;
  logic [31:0] q [$];
  int          got, t0;

  dispatch_fifo_bram #(.WIDTH(32), .DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_data, .full,
    .dispatch_en, .out_ready, .out_valid, .out_data, .empty, .clear);

  initial begin
    rst_n = 0; wr_en = 0; wr_data = 0; dispatch_en = 0; out_ready = 0; clear = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(empty && !full && !out_valid, "empty after reset")
    for (int i = 0; i < DEPTH + 5; i++) begin
      wr_en = 1; wr_data = $urandom;
      if (!full) q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    `CHECK(full, "full after DEPTH writes")
    `CHECK(q.size() == DEPTH, "accepted DEPTH words")
    repeat (5) @(negedge clk);
    `CHECK(!out_valid, "no output while dispatch_en is low")
    // drain with random ready
    dispatch_en = 1; got = 0;
    while (q.size() > DEPTH / 2) begin
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        `CHECK(out_data == q[0], "drain order")
        void'(q.pop_front()); got++;
      end
      @(negedge clk);
    end
    // full rate: count clocks for the rest
    out_ready = 1; t0 = 0;
    while (q.size() > 0) begin
      #1;
      if (out_valid) begin
        `CHECK(out_data == q[0], "drain order at full rate")
        void'(q.pop_front());
      end
      t0++;
      @(negedge clk);
    end
    `CHECK(t0 <= DEPTH / 2 + 2, "one word per clock")
    `CHECK(empty, "empty after draining")
    // clear
    dispatch_en = 0;
    for (int i = 0; i < 10; i++) begin wr_en = 1; wr_data = i; @(negedge clk); end
    wr_en = 0; clear = 1; @(negedge clk); clear = 0;
    `CHECK(empty && !out_valid, "clear empties")
    `TB_FINISH
  end
endmodule
