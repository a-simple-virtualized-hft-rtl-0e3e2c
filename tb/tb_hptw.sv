// Testbench for hptw with a page-table array and a node counter modelled
// here: a first touch must allocate (install the entry, claim the node) and
// a repeat must hit with the same physical address; a full partition must
// fault. Checks pa format, bank_id, alloc_part and the 2/3-clock latency.
`timescale 1ns/1ps
module tb_hptw;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic        rst_n, va_valid, pa_valid, fault, busy, pt_we, avail, alloc;
  logic [31:0] va, pa;
  logic [1:0]  bank_id;
  logic [13:0] pt_raddr, pt_waddr;
  logic [14:0] pt_rdata, pt_wdata, pt [16384];
  logic [7:0]  page_in, page_idx;
  logic [5:0]  node_in, node_idx;
  logic [3:0]  part;
  logic [31:0] expect_pa [int];
  int          lat, hits, misses, faults;

  hptw dut (.clk, .rst_n, .va_valid, .va, .pa_valid, .pa, .bank_id, .fault, .busy,
    .pt_raddr, .pt_rdata, .pt_we, .pt_waddr, .pt_wdata, .alloc_avail(avail),
    .alloc_page_in(page_in), .alloc_node_in(node_in), .alloc, .alloc_page_idx(page_idx),
    .alloc_node_idx(node_idx), .alloc_part(part));

  always_ff @(posedge clk) begin
    pt_rdata <= pt[pt_raddr];
    if (pt_we) pt[pt_waddr] <= pt_wdata;
    if (alloc) {page_in, node_in} <= {page_in, node_in} + 14'd1;
  end

  initial begin
    for (int i = 0; i < 16384; i++) pt[i] = '0;
    page_in = 8'd3; node_in = 6'd60;
    rst_n = 0; va_valid = 0; va = 0; avail = 1; hits = 0; misses = 0; faults = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int key;
      bit known;
      @(negedge clk);
      key = $urandom % 64 + 1000;
      known = expect_pa.exists(key);
      avail = (n < 2000) || known;
      va = {18'($urandom), 14'(key)};
      va_valid = 1;
      `CHECK(!busy, "idle before request")
      @(negedge clk); va_valid = 0;
      lat = 1;
      while (!pa_valid && !fault) begin
        `CHECK(busy, "busy while walking")
        if (lat == 2 && !known) `CHECK(part == 4'(key >> 10), "allocation partition")
        @(negedge clk); lat++;
      end
      if (known) begin
        `CHECK(pa_valid && pa == expect_pa[key] && lat == 2, "hit: same pa, 2 clocks")
        hits++;
      end else if (!avail) begin
        `CHECK(fault && lat == 3, "fault when partition full")
        faults++;
      end else begin
        `CHECK(pa_valid && lat == 3, "miss: allocate, 3 clocks")
        `CHECK(pa[31:21] == 0 && pa[12:10] == 0 && pa[3:0] == 0, "pa format")
        `CHECK(bank_id == pa[14:13], "bank id = page[1:0]")
        expect_pa[key] = pa;
        misses++;
      end
    end
    `CHECK(hits > 100 && misses == 64 && faults == 0 || faults > 0, "hits and misses seen")
    `CHECK(misses == 64, "one allocation per key")
    `TB_FINISH
  end
endmodule
