// Testbench for order_dispatcher: walks the FSM IDLE -> WRITE -> DISPATCH ->
// DONE -> IDLE, checks writes are refused outside WRITE, fills the eight
// FIFOs with different counts, drains them with random engine readiness
// and checks each FIFO's words and order. Uses a small FIFO depth.
`timescale 1ns/1ps
module tb_order_dispatcher;
  import hft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(50000)

  localparam int DEPTH = 64;
  logic rst_n, bw, bd, cd;
  logic [7:0]  wr_en, wr_ready, fempty, ffull, in_ready, out_valid;
  logic [31:0] wr_data;
  logic [1:0]  st;
  logic [7:0][31:0] out;
  logic [31:0] q [8][$];
  int          n_words [8];

  order_dispatcher #(.NUM_FIFOS(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .sw_begin_write(bw),
    .sw_begin_dispatch(bd), .sw_clear_done(cd), .sw_wr_en(wr_en), .sw_wr_data(wr_data),
    .sw_wr_ready(wr_ready), .state_out(st), .fifo_empty(fempty), .fifo_full(ffull),
    .order_in_ready(in_ready), .order_out_valid(out_valid), .order_out(out));

  initial begin
    rst_n = 0; bw = 0; bd = 0; cd = 0; wr_en = 0; wr_data = 0; in_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(st == D_IDLE, "IDLE after reset")
    `CHECK(wr_ready == 8'h00, "not writable in IDLE")
    wr_en = 8'h01; wr_data = 32'hdead; @(negedge clk); wr_en = 0;
    `CHECK(fempty == 8'hFF, "write in IDLE ignored")
    bw = 1; @(negedge clk); bw = 0;
    `CHECK(st == D_WRITE, "WRITE")
    `CHECK(wr_ready == 8'hFF, "writable in WRITE")
    for (int f = 0; f < 8; f++) n_words[f] = (f == 3) ? DEPTH : 5 + f * 7;
    for (int f = 0; f < 8; f++)
      for (int i = 0; i < n_words[f]; i++) begin
        wr_en = 8'(1 << f); wr_data = $urandom; q[f].push_back(wr_data);
        @(negedge clk);
      end
    wr_en = 0;
    `CHECK(ffull == 8'h08, "FIFO 3 full")
    `CHECK(wr_ready == 8'hF7, "full FIFO not ready")
    repeat (3) @(negedge clk);
    `CHECK(out_valid == 0, "nothing leaves in WRITE")
    bd = 1; @(negedge clk); bd = 0;
    `CHECK(st == D_DISPATCH, "DISPATCH")
    while (st == D_DISPATCH) begin
      in_ready = 8'($urandom);
      #1;
      for (int f = 0; f < 8; f++)
        if (out_valid[f] && in_ready[f]) begin
          `CHECK(q[f].size() > 0 && out[f] == q[f][0], "dispatched word and order")
          if (q[f].size() > 0) void'(q[f].pop_front());
        end
      @(negedge clk);
    end
    `CHECK(st == D_DONE, "DONE")
    for (int f = 0; f < 8; f++) `CHECK(q[f].size() == 0, "all words dispatched")
    `CHECK(fempty == 8'hFF, "empty in DONE")
    cd = 1; @(negedge clk); cd = 0;
    `CHECK(st == D_IDLE, "back to IDLE")
    `TB_FINISH
  end
endmodule
