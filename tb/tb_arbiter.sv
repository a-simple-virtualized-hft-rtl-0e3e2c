// Testbench for arbiter with four mem_bank instances: two walker models
// send random physical reads and writes, often to the same bank in the same
// clock. Writes are acknowledged, reads return the data last written at that
// physical address, and each answer carries the request's virtual address.
`timescale 1ns/1ps
module tb_arbiter;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)

  logic rst_n;
  logic        v0, v1, wr0, wr1, acc0, acc1, rej0, rej1;
  logic [31:0] va0, va1, pa0, pa1;
  logic [1:0]  b0, b1;
  logic [85:0] wd0, wd1;
  logic [3:0][85:0] rdata, mem_wdata, mem_rdata;
  logic [3:0][31:0] rdata_va, mem_addr;
  logic [3:0] rvalid, rwr, mem_we, mem_re, mem_rvalid, mem_wdone, mem_busy;
  // outstanding requests by virtual address: expected data (reads)
  logic [85:0] mem_model [int];
  logic [86:0] pending [int];   // {is_write, data}
  int sent, answered, same_bank, rejects;

  arbiter dut (.clk, .rst_n,
    .ptw0_valid(v0), .ptw0_va(va0), .ptw0_pa(pa0), .ptw0_bank_id(b0), .ptw0_wr(wr0), .ptw0_wdata(wd0),
    .ptw1_valid(v1), .ptw1_va(va1), .ptw1_pa(pa1), .ptw1_bank_id(b1), .ptw1_wr(wr1), .ptw1_wdata(wd1),
    .ptw0_accept(acc0), .ptw0_reject(rej0), .ptw1_accept(acc1), .ptw1_reject(rej1),
    .rdata, .rdata_va, .rdata_valid(rvalid), .rdata_wr(rwr),
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata, .mem_rdata_valid(mem_rvalid),
    .mem_wdone, .mem_busy);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    mem_bank u_bank (.clk, .rst_n, .mem_addr(mem_addr[b]), .mem_we(mem_we[b]), .mem_re(mem_re[b]),
      .mem_wdata(mem_wdata[b]), .mem_rdata(mem_rdata[b]), .mem_rdata_valid(mem_rvalid[b]),
      .mem_wdone(mem_wdone[b]), .mem_busy(mem_busy[b]));
  end

  // physical address of a small set of nodes; one request in flight per node
  function automatic logic [31:0] pa_of(int node);
    return {11'd0, 8'(node % 16), 3'd0, 6'(node / 16), 4'd0};
  endfunction

  // answers
  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < 4; b++) if (rvalid[b]) begin
      int key;
      key = int'(rdata_va[b]);
      `CHECK(pending.exists(key), "answer for an outstanding request")
      if (pending.exists(key)) begin
        `CHECK(rwr[b] == pending[key][86], "answer kind")
        if (!pending[key][86]) `CHECK(rdata[b] == pending[key][85:0], "read data")
        pending.delete(key);
        answered++;
      end
    end
  end

  task automatic pick(output logic v, output logic [31:0] va, output logic [31:0] pa,
                      output logic [1:0] b, output logic w, output logic [85:0] d, input int avoid);
    int node;
    v = 0; va = 0; pa = 0; b = 0; w = 0; d = 0;
    if ($urandom % 3 == 0) return;
    node = $urandom % 64;
    if (node == avoid || pending.exists(node)) return;
    v = 1; va = 32'(node); pa = pa_of(node); b = pa[14:13];
    w = !mem_model.exists(node) || ($urandom % 2);
    d = {22'($urandom), $urandom, $urandom};
  endtask

  initial begin
    rst_n = 0; v0 = 0; v1 = 0; sent = 0; answered = 0; same_bank = 0; rejects = 0;
    va0 = 0; va1 = 0; pa0 = 0; pa1 = 0; b0 = 0; b1 = 0; wr0 = 0; wr1 = 0; wd0 = 0; wd1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk); #1;
      pick(v0, va0, pa0, b0, wr0, wd0, -1);
      pick(v1, va1, pa1, b1, wr1, wd1, v0 ? int'(va0) : -1);
      #1;
      if (v0 && v1 && b0 == b1) same_bank++;
      if (v0 && acc0) begin
        pending[int'(va0)] = {wr0, wr0 ? 86'(0) : mem_model[int'(va0)]};
        if (wr0) mem_model[int'(va0)] = wd0;
        sent++;
      end
      if (v1 && acc1) begin
        pending[int'(va1)] = {wr1, wr1 ? 86'(0) : mem_model[int'(va1)]};
        if (wr1) mem_model[int'(va1)] = wd1;
        sent++;
      end
      if (rej0 || rej1) rejects++;
      `CHECK(!(v0 && acc0 && rej0) && !(v1 && acc1 && rej1), "accept xor reject")
    end
    @(posedge clk); #1;
    v0 = 0; v1 = 0;
    repeat (200) @(negedge clk);
    `CHECK(answered == sent && sent > 1000, "every request answered")
    `CHECK(same_bank > 100, "both walkers to one bank in a clock")
    `CHECK(rejects > 0, "queue full rejects seen")
    `TB_FINISH
  end
endmodule
