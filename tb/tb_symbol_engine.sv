// Testbench for symbol_engine with a virtual-memory model here behind its
// MMU port. Random bids and asks around one price are fed in; an order book
// model computes the expected trades (best price, then earliest order;
// trade of the smaller amount at the older order's price; the remainder
// stays at the top). Trades must match in order, price, quantity and order
// numbers, heap sizes must match, and the run must show full fills, partial
// fills on both sides, orders that fill several resting orders, and books
// deep enough to use virtual memory. The trade consumer stalls at random.
`timescale 1ns/1ps
module tb_symbol_engine;
  import hft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(3000000)

  logic rst_n;
  logic [31:0] now_ts;
  logic        oiv, oir, tov, tor, mv, mwr, mrdy, mrv, mrj, idle;
  logic [31:0] oid_data, mva;
  logic [85:0] tod, mwd, mrd;
  logic [13:0] bsz, asz;
  logic [15:0] hrej;

  symbol_engine #(.ENGINE_ID(3'd2)) dut (.clk, .rst_n, .now_ts,
    .order_in_valid(oiv), .order_in_data(oid_data), .order_in_ready(oir),
    .trade_out_valid(tov), .trade_out_data(tod), .trade_out_ready(tor),
    .mmu_req_valid(mv), .mmu_req_va(mva), .mmu_req_wr(mwr), .mmu_req_wdata(mwd), .mmu_req_ready(mrdy),
    .mmu_resp_data(mrd), .mmu_resp_valid(mrv), .mmu_resp_reject(mrj),
    .bid_size_o(bsz), .ask_size_o(asz), .engine_idle(idle), .hard_rejects_o(hrej));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now_ts <= 0; else now_ts <= now_ts + 1;

  // virtual memory model
  logic [85:0] vmem [int];
  logic        vbusy; int vdelay; logic [31:0] lva; logic lwr; logic [85:0] lwd;
  int          virt_ops;
  assign mrdy = !vbusy;
  always @(posedge clk) begin
    mrv <= 0; mrj <= 0;
    if (!rst_n) vbusy <= 0;
    else if (mv && mrdy) begin
      vbusy <= 1; lva <= mva; lwr <= mwr; lwd <= mwd; vdelay <= $urandom % 4; virt_ops++;
      `CHECK(mva[13:11] == 3'd2, "engine id in virtual address")
    end else if (vbusy) begin
      if (vdelay > 0) vdelay <= vdelay - 1;
      else begin
        vbusy <= 0; mrv <= 1;
        if (lwr) vmem[int'(lva)] = lwd; else mrd <= vmem[int'(lva)];
      end
    end
  end

  // book model: entries {seq, qty, price}
  typedef struct { int seq; int qty; int price; } ord_t;
  ord_t bids [$], asks [$];
  trade_t exp_q [$];
  int  n_full, n_pbid, n_pask, n_multi, max_depth, got;

  function automatic int best(ref ord_t q [$], input bit is_bid);
    int b; b = 0;
    for (int i = 1; i < q.size(); i++)
      if (is_bid ? (q[i].price > q[b].price || (q[i].price == q[b].price && q[i].seq < q[b].seq))
                 : (q[i].price < q[b].price || (q[i].price == q[b].price && q[i].seq < q[b].seq))) b = i;
    return b;
  endfunction

  task automatic model_order(int seq, bit is_bid, int qty, int price);
    int fills;
    ord_t o;
    o.seq = seq; o.qty = qty; o.price = price;
    if (is_bid) bids.push_back(o); else asks.push_back(o);
    fills = 0;
    while (bids.size() > 0 && asks.size() > 0) begin
      int bi, ai, q;
      trade_t t;
      bi = best(bids, 1); ai = best(asks, 0);
      if (bids[bi].price < asks[ai].price) break;
      q = (bids[bi].qty < asks[ai].qty) ? bids[bi].qty : asks[ai].qty;
      t = '0;
      t.bid_oid = 11'(bids[bi].seq); t.ask_oid = 11'(asks[ai].seq); t.qty = 16'(q);
      t.price = 16'((bids[bi].seq < asks[ai].seq) ? bids[bi].price : asks[ai].price);
      exp_q.push_back(t);
      if (bids[bi].qty == asks[ai].qty) n_full++;
      else if (bids[bi].qty > asks[ai].qty) n_pbid++;
      else n_pask++;
      bids[bi].qty -= q; asks[ai].qty -= q;
      if (bids[bi].qty == 0) bids.delete(bi);
      if (asks[ai].qty == 0) asks.delete(ai);
      fills++;
    end
    if (fills > 1) n_multi++;
    if (bids.size() > max_depth) max_depth = bids.size();
    if (asks.size() > max_depth) max_depth = asks.size();
  endtask

  // trade consumer
  always @(negedge clk) if (rst_n) begin
    tor = ($urandom % 4) != 0;
    #1;
    if (tov && tor) begin
      trade_t t;
      t = trade_t'(tod);
      `CHECK(exp_q.size() > 0, "trade expected")
      if (exp_q.size() > 0) begin
        `CHECK(t.bid_oid == exp_q[0].bid_oid && t.ask_oid == exp_q[0].ask_oid &&
               t.qty == exp_q[0].qty && t.price == exp_q[0].price, "trade matches model")
        void'(exp_q.pop_front());
      end
      got++;
    end
  end

  initial begin
    rst_n = 0; oiv = 0; oid_data = 0; tor = 0; virt_ops = 0; got = 0;
    n_full = 0; n_pbid = 0; n_pask = 0; n_multi = 0; max_depth = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      bit is_bid; int qty, price, drift;
      // phase drift: the two sides overlap little at first, so books grow
      drift = (n < 500) ? 25 : 0;
      is_bid = $urandom % 2;
      qty = (n % 7 == 0) ? 40 + $urandom % 60 : $urandom % 30 + 1;
      price = is_bid ? 1400 - drift + $urandom % 30 : 1415 + drift - $urandom % 30;
      @(negedge clk);
      oiv = 1; oid_data = {is_bid, 15'(qty), 16'(price)};
      do @(posedge clk); while (!oir);
      #1 oiv = 0;
      model_order(n, is_bid, qty, price);
    end
    wait (exp_q.size() == 0 && idle);
    repeat (5) @(negedge clk);
    `CHECK(int'(bsz) == bids.size() && int'(asz) == asks.size(), "book sizes")
    `CHECK(hrej == 0, "no orders dropped")
    `CHECK(n_full > 0 && n_pbid > 0 && n_pask > 0, "full and both partial fills")
    `CHECK(n_multi > 0, "one order filled against several")
    `CHECK(virt_ops > 0 && max_depth > 64, "book spilled into virtual memory")
    $display("trades %0d full %0d pbid %0d pask %0d multi %0d depth %0d virt %0d", got, n_full, n_pbid, n_pask, n_multi, max_depth, virt_ops);
    `TB_FINISH
  end
endmodule
