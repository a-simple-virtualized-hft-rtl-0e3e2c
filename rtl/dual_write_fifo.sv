// Per-bank request queue with two write ports. Both page-table walkers may
// send a request to the same bank in the same cycle; port 0 is stored ahead
// of port 1. full is raised while fewer than two slots are free, so a cycle
// that sees full low can always take both writes. Show-ahead read: rd_data
// is the oldest entry while empty is low, rd_en removes it.
// Ports follow the design; the full rule, depth and width are assumed.
module dual_write_fifo #(
  parameter int WIDTH = 152,
  parameter int DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr0_en,
  input  logic [WIDTH-1:0]           wr0_data,
  input  logic                       wr1_en,
  input  logic [WIDTH-1:0]           wr1_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp, wp1;
  logic             w0, w1, do_rd;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + AW'(1);
  endfunction

  assign empty   = (count == '0);
  assign full    = (count > CW'(DEPTH-2));
  assign rd_data = mem[rp];
  assign do_rd   = rd_en && !empty;
  assign w0      = wr0_en && !full;
  assign w1      = wr1_en && !full;
  assign wp1     = w0 ? inc(wp) : wp;

  always_ff @(posedge clk) begin
    if (w0) mem[wp]  <= wr0_data;
    if (w1) mem[wp1] <= wr1_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      wp    <= w1 ? inc(wp1) : wp1;
      if (do_rd) rp <= inc(rp);
      count <= count + CW'(w0) + CW'(w1) - CW'(do_rd);
    end
  end
endmodule
