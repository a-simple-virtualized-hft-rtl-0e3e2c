// Testbench for mmu with four mem_bank instances. Eight requester models
// each keep one request in flight: writes and reads of random nodes in
// their own address space (engine id in va[13:11]); every read must return
// the last value written there. Engine 7 then fills its bid partition
// (15 pages x 64 nodes): the 961st new node must be rejected. Also counts
// clocks in which round robin granted two requesters.
`timescale 1ns/1ps
module tb_mmu;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(400000)

  logic rst_n;
  logic [7:0]       req_valid, req_wr, req_ready, resp_valid, resp_reject;
  logic [7:0][31:0] req_va;
  logic [7:0][85:0] req_wdata, resp_data;
  logic [3:0][31:0] mem_addr;
  logic [3:0]       mem_we, mem_re, mem_rvalid, mem_busy, mem_wdone;
  logic [3:0][85:0] mem_wdata, mem_rdata;
  logic             idle;
  logic [85:0]      model [int];
  int               done_ops [8];
  int               doubles, rejects;

  mmu dut (.clk, .rst_n, .req_valid, .req_va, .req_wr, .req_wdata, .req_ready,
    .resp_data, .resp_valid, .resp_reject, .mem_addr, .mem_we, .mem_re, .mem_wdata,
    .mem_rdata, .mem_rdata_valid(mem_rvalid), .mem_busy, .mem_wdone, .idle);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    mem_bank u_bank (.clk, .rst_n, .mem_addr(mem_addr[b]), .mem_we(mem_we[b]), .mem_re(mem_re[b]),
      .mem_wdata(mem_wdata[b]), .mem_rdata(mem_rdata[b]), .mem_rdata_valid(mem_rvalid[b]),
      .mem_wdone(mem_wdone[b]), .mem_busy(mem_busy[b]));
  end

  always @(posedge clk) if ($countones(req_ready) == 2) doubles++;

  task automatic access(input int e, input bit wr, input logic [10:0] idx, output bit rej);
    logic [31:0] va;
    logic [85:0] d;
    va = {18'd0, 3'(e), idx};
    d  = {22'($urandom), $urandom, $urandom};
    @(negedge clk);
    req_valid[e] = 1; req_va[e] = va; req_wr[e] = wr; req_wdata[e] = d;
    do @(posedge clk); while (!req_ready[e]);
    #1 req_valid[e] = 0;
    do @(posedge clk); while (!resp_valid[e]);
    rej = resp_reject[e];
    if (!rej) begin
      if (wr) model[int'(va[13:0])] = d;
      else `CHECK(resp_data[e] == model[int'(va[13:0])], "read returns last write")
    end
    done_ops[e]++;
  endtask

  task automatic requester(input int e, input int nops);
    bit rej;
    for (int n = 0; n < nops; n++) begin
      logic [10:0] idx;
      idx = 11'($urandom % 48);
      if (!model.exists(int'({3'(e), idx}))) access(e, 1, idx, rej);
      else access(e, $urandom % 2, idx, rej);
      `CHECK(!rej, "no reject with space left")
    end
  endtask

  initial begin
    rst_n = 0; req_valid = 0; req_va = '0; req_wr = 0; req_wdata = '0; doubles = 0; rejects = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      requester(0, 300); requester(1, 300); requester(2, 300); requester(3, 300);
      requester(4, 300); requester(5, 300); requester(6, 300); requester(7, 300);
    join
    for (int e = 0; e < 8; e++) `CHECK(done_ops[e] == 300, "all operations completed")
    `CHECK(doubles > 50, "two winners per clock seen")
    // fill engine 7's bid partition: indices with va[10] = 1
    begin
      bit rej;
      int ok;
      ok = 0;
      for (int i = 0; i < 961; i++) begin
        access(7, 1, {1'b1, 10'(i)}, rej);
        if (!rej) ok++;
        else rejects++;
      end
      `CHECK(ok == 960 && rejects == 1, "partition holds 960 nodes, then rejects")
      access(7, 0, {1'b1, 10'd5}, rej);
      `CHECK(!rej, "allocated node still readable")
    end
    repeat (10) @(negedge clk);
    `CHECK(idle, "idle at the end")
    `TB_FINISH
  end
endmodule
