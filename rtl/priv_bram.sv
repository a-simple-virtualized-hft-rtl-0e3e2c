// Private memory page of one heap: a single-port synchronous RAM.
// The first DEPTH nodes of a heap (indices 0..63 by default) live here, so
// shallow heaps never touch the shared memory pool. A read (re) returns the
// word on rdata one clock later; a write (we) stores wdata at addr on the
// clock edge. The 64 x 86 size follows the 6-bit address and 86-bit node of
// the design; the one-cycle read latency is this implementation's choice.
module priv_bram #(
  parameter int WIDTH = 86,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
