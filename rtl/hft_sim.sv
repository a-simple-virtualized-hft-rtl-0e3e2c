// Hardware order-matching simulator for eight stocks.
// Software loads each stock's orders into the order dispatcher over an
// Avalon-MM register interface, starts the dispatch, and eight heap engines
// (one per stock) match bids against asks in parallel. Heaps that outgrow
// their private 64-node pages spill into a shared, virtually addressed pool
// (MMU with page-table walkers and four memory banks). Every trade goes
// through the round-robin trade aggregator into the trade log, which
// software reads back through the same registers.
//
// Registers (32-bit, word address = byte offset / 4), read latency 1 clock:
//   0x00 REG_CONTROL  W: bit0 begin write, bit1 begin dispatch, bit2 clear done
//                     R: dispatcher state
//   0x04 REG_STATUS   R: {trade_done, 7'b0, fifo_full[7:0], fifo_empty[7:0], 6'b0, state[1:0]}
//   0x08..0x24 REG_PUSH0..7  W: order word into stock i's FIFO
//                     R: sw_wr_ready
//   0x28 REG_LOG_INFO R: {trade_done, overflow, 16'b0, count[13:0]}
//   0x2C REG_LOG_CMD  W: bit31 clears the log, else reads entry bits 13:0
//   0x30 REG_LOG_DATA0 R: bits 31:0 of the entry read (timestamp)
//   0x34 REG_LOG_DATA1 R: bits 63:32 (amount, engine, price)
// Keys (active low): key[0] resets, key[1] and key[2] act as begin write and
// begin dispatch. trade_done: dispatcher in DONE, all engines idle and no
// trade waiting in the aggregator.
// Register names, offsets and blocks follow the design; bit layouts, key
// combining and the trade-done condition are this implementation's. The
// seven-segment display controller is not included; its inputs are outputs
// here.
module hft_sim
  import hft_pkg::*;
#(
  parameter int NUM_ENGINES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  input  logic [2:0]  key,
  output logic        trade_done,
  output logic        disp_fifo_all_full,
  output logic [1:0]  avl_disp_state,
  output logic [15:0] hard_rejects
);
  logic rstn;
  assign rstn = rst_n && key[0];

  // ---------------- register writes ----------------
  logic       wr_ctrl, wr_logcmd;
  logic [NUM_ENGINES-1:0] sw_wr_en, sw_wr_ready, fifo_empty, fifo_full;
  logic [1:0] dstate;

  assign wr_ctrl   = avs_write && avs_address == 4'd0;
  assign wr_logcmd = avs_write && avs_address == 4'd11;
  for (genvar i = 0; i < NUM_ENGINES; i++) begin : g_push
    assign sw_wr_en[i] = avs_write && avs_address == 4'(2 + i);
  end

  // ---------------- time base ----------------
  logic [31:0] now_ts;
  global_counter u_clock (.clk, .rst_n(rstn), .count(now_ts));

  // ---------------- dispatcher ----------------
  logic [NUM_ENGINES-1:0]       ord_valid, ord_ready;
  logic [NUM_ENGINES-1:0][31:0] ord_data;

  order_dispatcher #(.NUM_FIFOS(NUM_ENGINES)) u_disp (
    .clk, .rst_n(rstn),
    .sw_begin_write   ((wr_ctrl && avs_writedata[0]) || !key[1]),
    .sw_begin_dispatch((wr_ctrl && avs_writedata[1]) || !key[2]),
    .sw_clear_done    (wr_ctrl && avs_writedata[2]),
    .sw_wr_en, .sw_wr_data(avs_writedata), .sw_wr_ready,
    .state_out(dstate), .fifo_empty, .fifo_full,
    .order_in_ready(ord_ready), .order_out_valid(ord_valid), .order_out(ord_data)
  );

  // ---------------- engines ----------------
  logic [NUM_ENGINES-1:0]       t_valid, t_ready, m_valid, m_wr, m_ready, r_valid, r_rej, e_idle;
  logic [NUM_ENGINES-1:0][85:0] t_data, m_wdata, r_data;
  logic [NUM_ENGINES-1:0][31:0] m_va;
  logic [NUM_ENGINES-1:0][15:0] rej_cnt;

  for (genvar i = 0; i < NUM_ENGINES; i++) begin : g_eng
    symbol_engine #(.ENGINE_ID(3'(i))) u_eng (
      .clk, .rst_n(rstn), .now_ts,
      .order_in_valid(ord_valid[i]), .order_in_data(ord_data[i]), .order_in_ready(ord_ready[i]),
      .trade_out_valid(t_valid[i]), .trade_out_data(t_data[i]), .trade_out_ready(t_ready[i]),
      .mmu_req_valid(m_valid[i]), .mmu_req_va(m_va[i]), .mmu_req_wr(m_wr[i]),
      .mmu_req_wdata(m_wdata[i]), .mmu_req_ready(m_ready[i]),
      .mmu_resp_data(r_data[i]), .mmu_resp_valid(r_valid[i]), .mmu_resp_reject(r_rej[i]),
      .bid_size_o(), .ask_size_o(), .engine_idle(e_idle[i]), .hard_rejects_o(rej_cnt[i])
    );
  end

  always_comb begin
    hard_rejects = '0;
    for (int i = 0; i < NUM_ENGINES; i++) hard_rejects = hard_rejects + rej_cnt[i];
  end

  // ---------------- shared memory pool ----------------
  logic [3:0][31:0] mem_addr;
  logic [3:0]       mem_we, mem_re, mem_rvalid, mem_busy, mem_wdone;
  logic [3:0][85:0] mem_wdata, mem_rdata;
  logic             mmu_idle;

  mmu #(.NUM_REQ(NUM_ENGINES)) u_mmu (
    .clk, .rst_n(rstn),
    .req_valid(m_valid), .req_va(m_va), .req_wr(m_wr), .req_wdata(m_wdata), .req_ready(m_ready),
    .resp_data(r_data), .resp_valid(r_valid), .resp_reject(r_rej),
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata,
    .mem_rdata_valid(mem_rvalid), .mem_busy, .mem_wdone, .idle(mmu_idle)
  );

  for (genvar b = 0; b < 4; b++) begin : g_bank
    mem_bank u_bank (
      .clk, .rst_n(rstn),
      .mem_addr(mem_addr[b]), .mem_we(mem_we[b]), .mem_re(mem_re[b]), .mem_wdata(mem_wdata[b]),
      .mem_rdata(mem_rdata[b]), .mem_rdata_valid(mem_rvalid[b]),
      .mem_wdone(mem_wdone[b]), .mem_busy(mem_busy[b])
    );
  end

  // ---------------- trades ----------------
  logic             agg_valid, agg_ready;
  logic [63:0]      agg_data, log_rdata;
  logic [13:0]      log_count;
  logic             log_overflow;

  trade_aggregator #(.NUM_ENG(NUM_ENGINES)) u_agg (
    .clk, .rst_n(rstn),
    .eng_trade_valid(t_valid), .eng_trade_data(t_data), .eng_trade_ready(t_ready),
    .trade_out_valid(agg_valid), .trade_out_data(agg_data), .trade_out_ready(agg_ready)
  );

  trade_log u_log (
    .clk, .rst_n(rstn),
    .trade_in_valid(agg_valid), .trade_in_data(agg_data), .trade_in_ready(agg_ready),
    .sw_re(wr_logcmd && !avs_writedata[31]), .sw_addr(avs_writedata[13:0]),
    .sw_rdata(log_rdata), .sw_count(log_count), .sw_overflow(log_overflow),
    .sw_clear(wr_logcmd && avs_writedata[31])
  );

  // ---------------- trade done logic ----------------
  assign trade_done = (dstate == D_DONE) && (&e_idle) && !agg_valid && !(|t_valid) && mmu_idle;
  assign disp_fifo_all_full = &fifo_full;
  assign avl_disp_state     = dstate;

  // ---------------- register reads ----------------
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) avs_readdata <= '0;
    else if (avs_read) begin
      unique case (avs_address)
        4'd0:  avs_readdata <= 32'(dstate);
        4'd1:  avs_readdata <= {trade_done, 7'd0, 8'(fifo_full), 8'(fifo_empty), 6'd0, dstate};
        4'd10: avs_readdata <= {trade_done, log_overflow, 16'd0, log_count};
        4'd12: avs_readdata <= log_rdata[31:0];
        4'd13: avs_readdata <= log_rdata[63:32];
        default: avs_readdata <= (avs_address >= 4'd2 && avs_address < 4'(2 + NUM_ENGINES)) ?
                                 32'(sw_wr_ready[3'(avs_address - 4'd2)]) : 32'd0;
      endcase
    end
  end

  initial assert (NUM_ENGINES == 8) else $error("hft_sim: the register map and MMU assume 8 engines");
endmodule
