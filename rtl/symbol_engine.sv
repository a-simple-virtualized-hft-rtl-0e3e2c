// Heap engine of one stock: a limit order book made of a max-heap of bids
// and a min-heap of asks (heap_fsm each, with its own 64-node private page),
// driven by the trade control FSM:
//   T_IDLE       : take an order (order_in_ready), extend it to a node with
//                  the global timestamp now_ts and an order number
//   T_PUSH       : push it into its side's heap; if either heap is then
//                  empty go back to T_IDLE, else peek both roots
//   T_PEEK_BID, T_PEEK_ASK : read both roots
//   T_DECIDE     : no match (best bid below best ask) -> T_IDLE; a trade of
//                  min(bid qty, ask qty) at the older order's price.
//                  Ask larger or equal amounts -> T_POP_BID, bid larger ->
//                  T_POP_ASK
//   T_POP_BID    : then T_UPDATE_ASK (ask keeps the rest) or T_POP_ASK
//   T_POP_ASK    : then T_UPDATE_BID (bid keeps the rest) or T_EMIT_TRADE
//   T_UPDATE_*   : write the reduced quantity into the root
//   T_EMIT_TRADE : hold the trade on trade_out until taken, then peek again
//                  if both heaps hold orders (one order can fill against
//                  several), else T_IDLE.
// Both heaps share the engine's MMU port through mmu_owner.
// States and transitions follow the design. The order word layout, match
// rule, trade price rule and trade record are this implementation's.
// hard_rejects_o counts orders dropped because the heap's overflow space
// was exhausted.
module symbol_engine
  import hft_pkg::*;
#(
  parameter logic [2:0] ENGINE_ID  = 3'd0,
  parameter int         PRIV_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] now_ts,
  input  logic        order_in_valid,
  input  logic [31:0] order_in_data,
  output logic        order_in_ready,
  output logic        trade_out_valid,
  output logic [85:0] trade_out_data,
  input  logic        trade_out_ready,
  output logic        mmu_req_valid,
  output logic [31:0] mmu_req_va,
  output logic        mmu_req_wr,
  output logic [85:0] mmu_req_wdata,
  input  logic        mmu_req_ready,
  input  logic [85:0] mmu_resp_data,
  input  logic        mmu_resp_valid,
  input  logic        mmu_resp_reject,
  output logic [13:0] bid_size_o,
  output logic [13:0] ask_size_o,
  output logic        engine_idle,
  output logic [15:0] hard_rejects_o
);
  localparam int PAW = $clog2(PRIV_DEPTH);

  typedef enum logic [3:0] {
    T_IDLE, T_PUSH, T_PEEK_BID, T_PEEK_ASK, T_DECIDE, T_POP_BID, T_POP_ASK,
    T_UPDATE_BID, T_UPDATE_ASK, T_EMIT_TRADE
  } tstate_e;

  tstate_e     state;
  logic        issued;
  order_t      ord;
  node_t       new_node, bid_top, ask_top;
  trade_t      trade_q;
  logic        new_is_bid;
  logic [21:0] oid_cnt;
  logic        partial_ask, partial_bid, trade_match;

  // heap command wires: index 0 = bid heap, 1 = ask heap
  logic [1:0]        cmd_valid, cmd_ready, cmd_done, cmd_rej;
  logic [1:0][1:0]   cmd_op;
  logic [1:0][85:0]  cmd_data, root_out;
  logic [1:0][13:0]  hsize;
  logic [1:0]        p_we, p_re;
  logic [1:0][PAW-1:0] p_addr;
  logic [1:0][85:0]  p_wdata, p_rdata;
  logic [1:0]        v_valid, v_wr, v_ready, v_rvalid, v_rrej;
  logic [1:0][31:0]  v_va;
  logic [1:0][85:0]  v_wdata, v_rdata;

  assign ord         = order_t'(order_in_data);
  assign bid_size_o  = hsize[0];
  assign ask_size_o  = hsize[1];
  assign order_in_ready = (state == T_IDLE);
  assign engine_idle    = (state == T_IDLE);
  assign trade_out_valid = (state == T_EMIT_TRADE);
  assign trade_out_data  = trade_q;

  assign trade_match = bid_top.price >= ask_top.price;
  assign partial_ask = ask_top.qty > bid_top.qty;
  assign partial_bid = bid_top.qty > ask_top.qty;

  // command issue, one heap at a time
  always_comb begin
    cmd_valid = '0;
    cmd_op    = '{default: OP_PEEK};
    cmd_data  = '{default: '0};
    if (!issued) unique case (state)
      T_PUSH: begin
        cmd_valid[new_is_bid ? 0 : 1] = 1'b1;
        cmd_op[new_is_bid ? 0 : 1]    = OP_PUSH;
        cmd_data[new_is_bid ? 0 : 1]  = new_node;
      end
      T_PEEK_BID:   begin cmd_valid[0] = 1'b1; cmd_op[0] = OP_PEEK; end
      T_PEEK_ASK:   begin cmd_valid[1] = 1'b1; cmd_op[1] = OP_PEEK; end
      T_POP_BID:    begin cmd_valid[0] = 1'b1; cmd_op[0] = OP_POP;  end
      T_POP_ASK:    begin cmd_valid[1] = 1'b1; cmd_op[1] = OP_POP;  end
      T_UPDATE_BID: begin cmd_valid[0] = 1'b1; cmd_op[0] = OP_UPDATE; cmd_data[0] = bid_top; end
      T_UPDATE_ASK: begin cmd_valid[1] = 1'b1; cmd_op[1] = OP_UPDATE; cmd_data[1] = ask_top; end
      default: ;
    endcase
  end

  logic any_done;
  assign any_done = |cmd_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= T_IDLE;
      issued         <= 1'b0;
      new_node       <= '0;
      new_is_bid     <= 1'b0;
      bid_top        <= '0;
      ask_top        <= '0;
      trade_q        <= '0;
      oid_cnt        <= '0;
      hard_rejects_o <= '0;
    end else begin
      if (|(cmd_valid & cmd_ready)) issued <= 1'b1;
      if (any_done) issued <= 1'b0;
      unique case (state)
        T_IDLE: if (order_in_valid) begin
          new_node   <= '{oid: oid_cnt, qty: {1'b0, ord.qty}, ts: now_ts, price: ord.price};
          new_is_bid <= ord.is_bid;
          oid_cnt    <= oid_cnt + 22'd1;
          state      <= T_PUSH;
        end
        T_PUSH: if (any_done) begin
          if (|cmd_rej) hard_rejects_o <= hard_rejects_o + 16'd1;
          state <= (hsize[0] != '0 && hsize[1] != '0) ? T_PEEK_BID : T_IDLE;
        end
        T_PEEK_BID: if (any_done) begin
          bid_top <= root_out[0];
          state   <= T_PEEK_ASK;
        end
        T_PEEK_ASK: if (any_done) begin
          ask_top <= root_out[1];
          state   <= T_DECIDE;
        end
        T_DECIDE: begin
          if (!trade_match) state <= T_IDLE;
          else begin
            trade_q.bid_oid <= bid_top.oid[10:0];
            trade_q.ask_oid <= ask_top.oid[10:0];
            trade_q.qty     <= partial_ask ? bid_top.qty : ask_top.qty;
            trade_q.ts      <= now_ts;
            trade_q.price   <= (bid_top.ts < ask_top.ts) ? bid_top.price : ask_top.price;
            state <= partial_bid ? T_POP_ASK : T_POP_BID;
          end
        end
        T_POP_BID: if (any_done) begin
          if (partial_ask) begin
            ask_top.qty <= ask_top.qty - bid_top.qty;
            state       <= T_UPDATE_ASK;
          end else state <= T_POP_ASK;
        end
        T_POP_ASK: if (any_done) begin
          if (partial_bid) begin
            bid_top.qty <= bid_top.qty - ask_top.qty;
            state       <= T_UPDATE_BID;
          end else state <= T_EMIT_TRADE;
        end
        T_UPDATE_BID, T_UPDATE_ASK: if (any_done) state <= T_EMIT_TRADE;
        T_EMIT_TRADE: if (trade_out_ready)
          state <= (hsize[0] != '0 && hsize[1] != '0) ? T_PEEK_BID : T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_heap
    heap_fsm #(.IS_MAX(h == 0), .ENGINE_ID(ENGINE_ID), .PRIV_DEPTH(PRIV_DEPTH)) u_heap (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[h]), .cmd_op(cmd_op[h]), .cmd_data_in(cmd_data[h]),
      .cmd_ready(cmd_ready[h]), .cmd_done(cmd_done[h]), .cmd_root_out(root_out[h]),
      .cmd_rejected(cmd_rej[h]), .size_out(hsize[h]),
      .priv_we(p_we[h]), .priv_re(p_re[h]), .priv_addr(p_addr[h]),
      .priv_wdata(p_wdata[h]), .priv_rdata(p_rdata[h]),
      .virt_req_valid(v_valid[h]), .virt_req_va(v_va[h]), .virt_req_wr(v_wr[h]),
      .virt_req_wdata(v_wdata[h]), .virt_req_ready(v_ready[h]),
      .virt_resp_valid(v_rvalid[h]), .virt_resp_data(v_rdata[h]), .virt_resp_reject(v_rrej[h])
    );
    priv_bram #(.WIDTH(86), .DEPTH(PRIV_DEPTH)) u_priv (
      .clk, .we(p_we[h]), .re(p_re[h]), .addr(p_addr[h]),
      .wdata(p_wdata[h]), .rdata(p_rdata[h])
    );
  end

  mmu_owner u_owner (
    .clk, .rst_n,
    .a_req_valid(v_valid[0]), .a_req_va(v_va[0]), .a_req_wr(v_wr[0]), .a_req_wdata(v_wdata[0]),
    .a_req_ready(v_ready[0]), .a_resp_valid(v_rvalid[0]), .a_resp_data(v_rdata[0]), .a_resp_reject(v_rrej[0]),
    .b_req_valid(v_valid[1]), .b_req_va(v_va[1]), .b_req_wr(v_wr[1]), .b_req_wdata(v_wdata[1]),
    .b_req_ready(v_ready[1]), .b_resp_valid(v_rvalid[1]), .b_resp_data(v_rdata[1]), .b_resp_reject(v_rrej[1]),
    .mmu_req_valid, .mmu_req_va, .mmu_req_wr, .mmu_req_wdata, .mmu_req_ready,
    .mmu_resp_data, .mmu_resp_valid, .mmu_resp_reject
  );
endmodule
