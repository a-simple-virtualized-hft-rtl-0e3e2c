// Trade aggregator: collects trades from the eight engines with round-robin
// selection and compresses each 86-bit trade record into the 64-bit log
// entry {6'b0, amount[6:0], engine[2:0], price[15:0], timestamp[31:0]}.
// The engine number is the index of the input the trade arrived on.
// Output is a one-entry register with valid/ready: the winner is taken
// (eng_trade_ready pulses for it) when the register is empty or is being
// read in the same clock, so a ready log takes one trade per clock.
// Round robin and the four log fields follow the design; the field order,
// with the timestamp in the low word, is assumed.
module trade_aggregator
  import hft_pkg::*;
#(
  parameter int NUM_ENG = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NUM_ENG-1:0]             eng_trade_valid,
  input  logic [NUM_ENG-1:0][NODE_W-1:0] eng_trade_data,
  output logic [NUM_ENG-1:0]             eng_trade_ready,
  output logic                           trade_out_valid,
  output logic [LOG_W-1:0]               trade_out_data,
  input  logic                           trade_out_ready
);
  localparam int IW = $clog2(NUM_ENG);
  logic [NUM_ENG-1:0] grant;
  logic [IW-1:0]      gidx;
  logic               gvalid, take;

  assign take = gvalid && (!trade_out_valid || trade_out_ready);
  assign eng_trade_ready = take ? grant : '0;

  rr_arbiter #(.N(NUM_ENG)) u_rr (
    .clk, .rst_n, .req(eng_trade_valid), .advance(take),
    .grant, .grant_idx(gidx), .grant_valid(gvalid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trade_out_valid <= 1'b0;
      trade_out_data  <= '0;
    end else if (take) begin
      trade_out_valid <= 1'b1;
      trade_out_data  <= pack_log(trade_t'(eng_trade_data[gidx]), 3'(gidx));
    end else if (trade_out_ready) begin
      trade_out_valid <= 1'b0;
    end
  end
endmodule
