// Order dispatcher: the hand-over point between the software harness and the
// eight per-stock engines. A four-state FSM gates eight block-RAM FIFOs:
//   IDLE     -> WRITE    on sw_begin_write
//   WRITE    -> DISPATCH on sw_begin_dispatch (software fills FIFOs in WRITE)
//   DISPATCH -> DONE     once every FIFO is empty (all orders handed over)
//   DONE     -> IDLE     on sw_clear_done
// In WRITE, sw_wr_en[i] stores sw_wr_data into FIFO i (sw_wr_ready[i] says it
// has room). In DISPATCH each FIFO drains independently into engine i over a
// valid/ready pair, one word per clock when the engine is ready.
// The four states and the ports follow the design. order_out is one 32-bit
// word per FIFO (8 x 32). The FIFOs are cleared on leaving DONE; that, the
// state encoding and the FIFO depth are assumed.
module order_dispatcher
  import hft_pkg::*;
#(
  parameter int NUM_FIFOS = 8,
  parameter int DEPTH     = 1792
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sw_begin_write,
  input  logic                          sw_begin_dispatch,
  input  logic                          sw_clear_done,
  input  logic [NUM_FIFOS-1:0]          sw_wr_en,
  input  logic [31:0]                   sw_wr_data,
  output logic [NUM_FIFOS-1:0]          sw_wr_ready,
  output logic [1:0]                    state_out,
  output logic [NUM_FIFOS-1:0]          fifo_empty,
  output logic [NUM_FIFOS-1:0]          fifo_full,
  input  logic [NUM_FIFOS-1:0]          order_in_ready,
  output logic [NUM_FIFOS-1:0]          order_out_valid,
  output logic [NUM_FIFOS-1:0][31:0]    order_out
);
  disp_state_e state;
  logic        clear;

  assign state_out = state;
  assign clear     = (state == D_DONE) && sw_clear_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= D_IDLE;
    else unique case (state)
      D_IDLE:     if (sw_begin_write)    state <= D_WRITE;
      D_WRITE:    if (sw_begin_dispatch) state <= D_DISPATCH;
      D_DISPATCH: if (&fifo_empty)       state <= D_DONE;
      D_DONE:     if (sw_clear_done)     state <= D_IDLE;
    endcase
  end

  for (genvar i = 0; i < NUM_FIFOS; i++) begin : g_fifo
    assign sw_wr_ready[i] = (state == D_WRITE) && !fifo_full[i];
    dispatch_fifo_bram #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en      (sw_wr_en[i] && (state == D_WRITE)),
      .wr_data    (sw_wr_data),
      .full       (fifo_full[i]),
      .dispatch_en(state == D_DISPATCH),
      .out_ready  (order_in_ready[i]),
      .out_valid  (order_out_valid[i]),
      .out_data   (order_out[i]),
      .empty      (fifo_empty[i]),
      .clear      (clear)
    );
  end
endmodule
