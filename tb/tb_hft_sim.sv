// End-to-end testbench for hft_sim at its default size, driven only through
// the Avalon registers and keys, the way the software harness drives it:
//   fill all eight dispatch FIFOs to full (1792 orders each, written round
//   robin over REG_PUSH0..7), start dispatch with KEY2, poll REG_STATUS for
//   trade_done, then read the whole trade log back through REG_LOG_CMD /
//   REG_LOG_DATA0/1.
// Stocks 0-3 get one huge ask swept by small bids (one trade per order),
// stocks 4-6 random books around a price that first diverge (deep books that
// spill into the shared memory pool) and then cross, stock 7 only bids
// (its bid partition runs out: hard rejects). In total more trades are made
// than the log holds, so the log must overflow. An order-book model gives
// each stock's expected trades; each stock's entries in the log must be a
// prefix of its expected list, in order. Every mechanism below must occur.
`timescale 1ns/1ps
module tb_hft_sim;
  import hft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(6000000)

  localparam int FIFO_DEPTH = 1792;
  localparam int LOG_DEPTH  = 8704;

  logic        rst_n;
  logic [3:0]  address;
  logic        write, read;
  logic [31:0] writedata, readdata;
  logic [2:0]  key;
  logic        trade_done, all_full;
  logic [1:0]  dstate;
  logic [15:0] hard_rejects;

  hft_sim dut (.clk, .rst_n, .avs_address(address), .avs_write(write), .avs_writedata(writedata),
    .avs_read(read), .avs_readdata(readdata), .key, .trade_done, .disp_fifo_all_full(all_full),
    .avl_disp_state(dstate), .hard_rejects);

  // ---------------- Avalon master ----------------
  task automatic avs_wr(input int a, input logic [31:0] d);
    @(negedge clk); address = 4'(a); writedata = d; write = 1;
    @(negedge clk); write = 0;
  endtask
  task automatic avs_rd(input int a, output logic [31:0] d);
    @(negedge clk); address = 4'(a); read = 1;
    @(negedge clk); read = 0; d = readdata;
  endtask

  // ---------------- mechanism counters (observed) ----------------
  int seen_state [4];
  int c_stall, c_mmu_req, c_two_grants, c_agg_contend, c_cache_peek, c_log_read;
  int c_pt_alloc, c_pt_walk, c_pt_fault, c_bank_use [4];
  always @(posedge clk) if (rst_n) begin
    seen_state[dstate]++;
    if (|(dut.ord_valid & ~dut.ord_ready)) c_stall++;
    if (|(dut.m_valid & dut.m_ready)) c_mmu_req++;
    if ($countones(dut.m_ready) == 2) c_two_grants++;
    if ($countones(dut.t_valid) >= 2) c_agg_contend++;
    if (dut.g_eng[4].u_eng.g_heap[0].u_heap.state == 4'd0 && dut.g_eng[4].u_eng.g_heap[0].u_heap.cmd_valid &&
        dut.g_eng[4].u_eng.g_heap[0].u_heap.cmd_op == 2'd2 && dut.g_eng[4].u_eng.g_heap[0].u_heap.cache_valid[0])
      c_cache_peek++;
    if (dut.u_log.sw_re) c_log_read++;
    c_pt_alloc += $countones(dut.u_mmu.alloc);
    c_pt_walk  += $countones(dut.u_mmu.pa_valid);
    c_pt_fault += $countones(dut.u_mmu.fault);
    for (int b = 0; b < 4; b++) if (dut.u_mmu.mem_we[b] || dut.u_mmu.mem_re[b]) c_bank_use[b]++;
  end

  // ---------------- order book model ----------------
  typedef struct { int seq; int qty; int price; } ord_t;
  ord_t   bids [8][$], asks [8][$];
  logic [31:0] exp_q [8][$];   // expected word1 of each trade
  int     seqn [8], n_full, n_pbid, n_pask, n_multi, max_depth, model_rejects;

  function automatic int best(ref ord_t q [$], input bit is_bid);
    int b; b = 0;
    for (int i = 1; i < q.size(); i++)
      if (is_bid ? (q[i].price > q[b].price || (q[i].price == q[b].price && q[i].seq < q[b].seq))
                 : (q[i].price < q[b].price || (q[i].price == q[b].price && q[i].seq < q[b].seq))) b = i;
    return b;
  endfunction

  task automatic model_order(int e, bit is_bid, int qty, int price);
    int fills;
    ord_t o;
    o.seq = seqn[e]++; o.qty = qty; o.price = price;
    // a heap holds 64 private + 960 shared nodes
    if (is_bid && bids[e].size() == 1024) begin model_rejects++; return; end
    if (!is_bid && asks[e].size() == 1024) begin model_rejects++; return; end
    if (is_bid) bids[e].push_back(o); else asks[e].push_back(o);
    fills = 0;
    while (bids[e].size() > 0 && asks[e].size() > 0) begin
      int bi, ai, q, p;
      bi = best(bids[e], 1); ai = best(asks[e], 0);
      if (bids[e][bi].price < asks[e][ai].price) break;
      q = (bids[e][bi].qty < asks[e][ai].qty) ? bids[e][bi].qty : asks[e][ai].qty;
      p = (bids[e][bi].seq < asks[e][ai].seq) ? bids[e][bi].price : asks[e][ai].price;
      exp_q[e].push_back({6'b0, 7'(q), 3'(e), 16'(p)});
      if (bids[e][bi].qty == asks[e][ai].qty) n_full++;
      else if (bids[e][bi].qty > asks[e][ai].qty) n_pbid++;
      else n_pask++;
      bids[e][bi].qty -= q; asks[e][ai].qty -= q;
      if (bids[e][bi].qty == 0) bids[e].delete(bi);
      if (asks[e][ai].qty == 0) asks[e].delete(ai);
      fills++;
    end
    if (fills > 1) n_multi++;
    if (bids[e].size() > max_depth) max_depth = bids[e].size();
    if (asks[e].size() > max_depth) max_depth = asks[e].size();
  endtask

  function automatic logic [31:0] gen_order(int e, int n);
    bit is_bid; int qty, price, drift;
    if (e < 4) begin
      if (n == 0) return {1'b0, 15'd30000, 16'd1000};          // huge resting ask
      return {1'b1, 15'($urandom % 15 + 1), 16'(1000 + $urandom % 10)};
    end else if (e < 7) begin
      drift = (n < 700) ? 25 : 0;
      is_bid = $urandom % 2;
      qty = (n % 7 == 0) ? 40 + $urandom % 60 : $urandom % 30 + 1;
      price = is_bid ? 1400 - drift + $urandom % 30 : 1415 + drift - $urandom % 30;
      return {is_bid, 15'(qty), 16'(price)};
    end
    return {1'b1, 15'($urandom % 50 + 1), 16'(500 + $urandom % 100)};
  endfunction

  initial begin
    logic [31:0] d, w0, w1;
    int total_exp, count, pos [8];
    logic [31:0] last_ts [8];
    rst_n = 0; address = 0; write = 0; read = 0; writedata = 0; key = 3'b111;
    n_full = 0; n_pbid = 0; n_pask = 0; n_multi = 0; max_depth = 0; model_rejects = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    avs_rd(0, d);
    `CHECK(d[1:0] == 2'(D_IDLE), "IDLE after reset")
    avs_wr(0, 32'h1);                                         // begin write
    avs_rd(1, d);
    `CHECK(d[1:0] == 2'(D_WRITE), "WRITE state")
    // fill every FIFO, round robin like the harness
    for (int n = 0; n < FIFO_DEPTH; n++)
      for (int e = 0; e < 8; e++) begin
        logic [31:0] o;
        o = gen_order(e, n);
        avs_wr(2 + e, o);
        model_order(e, o[31], int'(o[30:16]), int'(o[15:0]));
      end
    `CHECK(all_full, "all dispatch FIFOs full")
    avs_rd(1, d);
    `CHECK(d[23:16] == 8'hFF, "REG_STATUS fifo_full")
    // KEY2: begin dispatch
    @(negedge clk); key[2] = 0; repeat (3) @(negedge clk); key[2] = 1;
    `CHECK(dstate == 2'(D_DISPATCH) || dstate == 2'(D_DONE), "DISPATCH by key")
    do begin
      repeat (200) @(negedge clk);
      avs_rd(1, d);
    end while (!d[31]);
    `CHECK(dstate == 2'(D_DONE), "DONE state")
    avs_rd(10, d);
    count = int'(d[13:0]);
    total_exp = 0;
    for (int e = 0; e < 8; e++) total_exp += exp_q[e].size();
    `CHECK(total_exp > LOG_DEPTH, "workload makes more trades than the log holds")
    `CHECK(count == LOG_DEPTH && d[30], "log full and overflow flag set")
    `CHECK(int'(hard_rejects) == model_rejects && model_rejects > 0, "hard rejects match the model")
    // read the log back: per stock, a prefix of the expected trades in order
    for (int i = 0; i < count; i++) begin
      int e;
      avs_wr(11, 32'(i));
      avs_rd(12, w0);
      avs_rd(13, w1);
      e = int'(w1[18:16]);
      `CHECK(pos[e] < exp_q[e].size() && w1 == exp_q[e][pos[e]], "logged trade matches model")
      if (i > 0 && pos[e] > 0) `CHECK(w0 >= last_ts[e], "timestamps rise per stock")
      last_ts[e] = w0;
      pos[e]++;
    end
    avs_wr(0, 32'h4);                                         // clear done
    avs_rd(0, d);
    `CHECK(d[1:0] == 2'(D_IDLE), "back to IDLE")
    avs_wr(11, 32'h8000_0000);
    avs_rd(10, d);
    `CHECK(d[13:0] == 0 && !d[30], "log cleared")
    // mechanisms
    for (int s = 0; s < 4; s++) `CHECK(seen_state[s] > 0, "every dispatcher state")
    `CHECK(c_stall > 0, "dispatcher waited for a busy engine")
    `CHECK(c_mmu_req > 0 && max_depth > 64, "books spilled into the shared pool")
    `CHECK(c_two_grants > 0, "MMU granted two engines in one clock")
    `CHECK(c_agg_contend > 0, "aggregator chose between engines")
    `CHECK(c_cache_peek > 0, "peek served by the top-3 cache")
    `CHECK(n_full > 0 && n_pbid > 0 && n_pask > 0 && n_multi > 0, "full, partial and multiple fills")
    `CHECK(c_log_read == count, "software log reads")
    `CHECK(c_pt_alloc > 0, "page-table misses allocated new nodes")
    `CHECK(c_pt_walk > c_pt_alloc, "page-table hits on nodes already allocated")
    `CHECK(c_pt_fault > 0, "walker faults on an exhausted partition")
    for (int b = 0; b < 4; b++) `CHECK(c_bank_use[b] > 0, "every memory bank used")
    $display("trades expected %0d logged %0d rejects %0d depth %0d stalls %0d mmu %0d two %0d contend %0d peeks %0d full %0d pbid %0d pask %0d multi %0d alloc %0d walks %0d faults %0d",
             total_exp, count, model_rejects, max_depth, c_stall, c_mmu_req, c_two_grants, c_agg_contend,
             c_cache_peek, n_full, n_pbid, n_pask, n_multi, c_pt_alloc, c_pt_walk, c_pt_fault);
    `TB_FINISH
  end
endmodule
