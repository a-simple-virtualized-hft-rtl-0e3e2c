// Testbench for mmu_owner: both heaps request at random; a simple MMU model
// here answers each accepted request after a random delay with a tag of the
// requester. Checks that only one request is in flight, the bid heap wins
// ties, and every answer reaches the heap that asked.
`timescale 1ns/1ps
module tb_mmu_owner;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic rst_n;
  logic av, awr, ardy, arv, arj, bv, bwr, brdy, brv, brj;
  logic [31:0] ava, bva, mva;
  logic [85:0] awd, bwd, ard, brd, mwd, mrd;
  logic mv, mwr, mrdy, mrv, mrj;
  int   in_flight, delay, a_done, b_done, ties;
  logic [31:0] fl_va;

  mmu_owner dut (.clk, .rst_n,
    .a_req_valid(av), .a_req_va(ava), .a_req_wr(awr), .a_req_wdata(awd), .a_req_ready(ardy),
    .a_resp_valid(arv), .a_resp_data(ard), .a_resp_reject(arj),
    .b_req_valid(bv), .b_req_va(bva), .b_req_wr(bwr), .b_req_wdata(bwd), .b_req_ready(brdy),
    .b_resp_valid(brv), .b_resp_data(brd), .b_resp_reject(brj),
    .mmu_req_valid(mv), .mmu_req_va(mva), .mmu_req_wr(mwr), .mmu_req_wdata(mwd), .mmu_req_ready(mrdy),
    .mmu_resp_data(mrd), .mmu_resp_valid(mrv), .mmu_resp_reject(mrj));

  // MMU model: accepts at random when nothing is in flight, answers later
  // with the request's address in the data
  always_comb begin
    mrdy = ($urandom % 2 == 0);
    mrv = (in_flight == 1) && (delay == 0);
    mrd = {54'd0, fl_va};
    mrj = mrv && fl_va[0];
  end
  always @(posedge clk) begin
    if (mv && mrdy) begin
      `CHECK(in_flight == 0, "one request in flight")
      in_flight <= 1; fl_va <= mva; delay <= $urandom % 6;
    end else if (in_flight == 1) begin
      if (delay == 0) in_flight <= 0; else delay <= delay - 1;
    end
  end

  initial begin
    in_flight = 0; delay = 0; fl_va = 0; a_done = 0; b_done = 0; ties = 0;
    rst_n = 0; av = 0; bv = 0; ava = 0; bva = 0; awr = 0; bwr = 0; awd = 0; bwd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 300; n++) begin   // bid heap
        @(negedge clk); av = 1; ava = {1'b1, 30'($urandom), 1'($urandom)}; awr = 1'($urandom);
        #1 if (bv && mv) begin ties++; `CHECK(mva == ava, "bid heap first") end
        do @(posedge clk); while (!ardy);
        #1 av = 0;
        do @(posedge clk); while (!arv);
        `CHECK(ard[31:0] == ava && arj == ava[0], "answer to bid heap")
        a_done++;
      end
      for (int n = 0; n < 300; n++) begin   // ask heap
        @(negedge clk); bv = 1; bva = {1'b0, 30'($urandom), 1'($urandom)}; bwr = 1'($urandom);
        do @(posedge clk); while (!brdy);
        #1 bv = 0;
        do @(posedge clk); while (!brv);
        `CHECK(brd[31:0] == bva && brj == bva[0], "answer to ask heap")
        b_done++;
      end
    join
    `CHECK(a_done == 300 && b_done == 300, "all requests answered")
    `CHECK(ties > 10, "both heaps asked at once")
    `TB_FINISH
  end
endmodule
