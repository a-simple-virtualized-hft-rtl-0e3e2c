// Shared types and constants of the order-matching engine.
//
// A software order is one 32-bit word: bit 31 is the side (1 = bid, 0 = ask),
// bits 30:16 the quantity and bits 15:0 the price. Inside an engine the order
// becomes an 86-bit heap node that adds the arrival timestamp (global cycle
// counter) and a per-engine order number. A trade leaves an engine as an
// 86-bit record and is squeezed to a 64-bit log entry by the aggregator.
// The widths 32, 86 and 64, the 16-bit price, 32-bit timestamp, 3-bit engine
// id and 7-bit logged amount are the design's; the order of the fields and
// the order number are choices of this implementation.
package hft_pkg;

  localparam int NODE_W = 86;
  localparam int LOG_W  = 64;

  typedef struct packed {
    logic [21:0] oid;    // order number within the engine
    logic [15:0] qty;
    logic [31:0] ts;     // arrival time, global counter
    logic [15:0] price;
  } node_t;

  typedef struct packed {
    logic [10:0] bid_oid;
    logic [10:0] ask_oid;
    logic [15:0] qty;
    logic [31:0] ts;     // time the trade was emitted
    logic [15:0] price;
  } trade_t;

  typedef struct packed {
    logic        is_bid;
    logic [14:0] qty;
    logic [15:0] price;
  } order_t;

  // Heap commands
  typedef enum logic [1:0] {
    OP_PUSH   = 2'd0,
    OP_POP    = 2'd1,
    OP_PEEK   = 2'd2,
    OP_UPDATE = 2'd3
  } heap_op_e;

  // Order dispatcher states
  typedef enum logic [1:0] {
    D_IDLE     = 2'd0,
    D_WRITE    = 2'd1,
    D_DISPATCH = 2'd2,
    D_DONE     = 2'd3
  } disp_state_e;


  // 64-bit log entry: {6'b0, amount[6:0], engine[2:0], price[15:0], ts[31:0]}
  function automatic logic [LOG_W-1:0] pack_log(trade_t t, logic [2:0] eng);
    return {6'b0, t.qty[6:0], eng, t.price, t.ts};
  endfunction

  // Heap order: a is strictly better than b. Max heap prefers higher price,
  // min heap lower; equal prices go to the earlier timestamp.
  function automatic logic node_better(node_t a, node_t b, logic is_max);
    if (a.price != b.price) return is_max ? (a.price > b.price) : (a.price < b.price);
    return a.ts < b.ts;
  endfunction

endpackage
