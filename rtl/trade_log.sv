// Trade log: a single-port memory of DEPTH 64-bit entries (8704 by default)
// that records every trade in arrival order for software to read back.
// One access per clock: a software read (sw_re, entry sw_addr) owns the port
// and holds trade_in_ready low for that clock; its entry appears on sw_rdata
// the next clock. Otherwise an incoming trade is written at sw_count and the
// count increments. Once DEPTH entries are stored further trades are still
// accepted but dropped, and sw_overflow stays set until sw_clear, which also
// empties the log. The depth, the overflow flag and the 64-bit entry follow
// the design. The design gives the software address as 5 bits, too few for
// 8704 entries; here it is 14 bits wide.
module trade_log
  import hft_pkg::*;
#(
  parameter int DEPTH = 8704
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trade_in_valid,
  input  logic [LOG_W-1:0] trade_in_data,
  output logic             trade_in_ready,
  input  logic             sw_re,
  input  logic [13:0]      sw_addr,
  output logic [LOG_W-1:0] sw_rdata,
  output logic [13:0]      sw_count,
  output logic             sw_overflow,
  input  logic             sw_clear
);
  logic [LOG_W-1:0] mem [DEPTH];
  logic             do_wr, is_full;

  assign is_full        = (sw_count == 14'(DEPTH));
  assign trade_in_ready = !sw_re && !sw_clear;
  assign do_wr          = trade_in_valid && trade_in_ready && !is_full;

  // single port: one address per clock
  always_ff @(posedge clk) begin
    if (sw_re) sw_rdata <= mem[sw_addr];
    else if (do_wr) mem[sw_count] <= trade_in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_count    <= '0;
      sw_overflow <= 1'b0;
    end else if (sw_clear) begin
      sw_count    <= '0;
      sw_overflow <= 1'b0;
    end else begin
      if (do_wr) sw_count <= sw_count + 14'd1;
      if (trade_in_valid && trade_in_ready && is_full) sw_overflow <= 1'b1;
    end
  end

  initial assert (DEPTH < 16384) else $error("trade_log: count is 14 bits");
endmodule
