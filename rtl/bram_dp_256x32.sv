// One page of public memory: a 256 x 32 simple dual-port RAM (one write port,
// one read port). A page holds 64 nodes of 86 bits, each spread over words
// {node, 2'bww}, w = 0..2. rdata holds the word at raddr one clock after re.
// Size and ports follow the design; the registered read is assumed.
module bram_dp_256x32 (
  input  logic        clk,
  input  logic        we,
  input  logic        re,
  input  logic [7:0]  waddr,
  input  logic [7:0]  raddr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] mem [256];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
