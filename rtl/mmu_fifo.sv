// MMU input FIFO: holds requests picked by the round-robin selector until
// its page-table walker is free. Show-ahead: rd_data is the oldest entry
// whenever empty is low, and rd_en removes it. A write to a full FIFO is
// dropped (the MMU never does one: it only grants when count < DEPTH).
// The 4-bit count follows the design; the depth of 8 is assumed.
module mmu_fifo #(
  parameter int WIDTH = 121,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [3:0]       count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty   = (count == 4'd0);
  assign rd_data = mem[rp];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (count < 4'(DEPTH) || do_rd);

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + AW'(1);
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + AW'(1);
      count <= count + 4'(do_wr) - 4'(do_rd);
    end
  end

  initial assert (DEPTH <= 15) else $error("mmu_fifo: count is 4 bits");
endmodule
