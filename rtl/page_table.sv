// Page table of the shared memory pool: one 15-bit entry per 14-bit key,
// entry = {valid, physical page[7:0], node[5:0]}. The key is the owning
// engine (3 bits) followed by the low 11 bits of the virtual address, so the
// table maps every overflow node of every heap individually.
// Two read ports and two write ports serve the two page-table walkers
// (reads return data one clock after raddr is presented). The walkers never
// work on the same key at once, because each engine has a single request in
// flight. After reset the table clears itself one entry per clock, using
// write port 0; ready rises when all 2^KEY_W entries are invalid.
// Size and entry layout follow the design; the port count and the clearing
// sweep are this implementation's choices.
module page_table #(
  parameter int KEY_W = 14,
  parameter int PTE_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] raddr0,
  output logic [PTE_W-1:0] rdata0,
  input  logic [KEY_W-1:0] raddr1,
  output logic [PTE_W-1:0] rdata1,
  input  logic             we0,
  input  logic [KEY_W-1:0] waddr0,
  input  logic [PTE_W-1:0] wdata0,
  input  logic             we1,
  input  logic [KEY_W-1:0] waddr1,
  input  logic [PTE_W-1:0] wdata1,
  output logic             ready
);
  logic [PTE_W-1:0] mem [2**KEY_W];
  logic [KEY_W-1:0] clr_addr;
  logic             w0;
  logic [KEY_W-1:0] a0;
  logic [PTE_W-1:0] d0;

  assign w0 = !ready || we0;
  assign a0 = ready ? waddr0 : clr_addr;
  assign d0 = ready ? wdata0 : '0;

  always_ff @(posedge clk) begin
    if (w0)  mem[a0]     <= d0;
    if (we1) mem[waddr1] <= wdata1;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_addr <= '0;
      ready    <= 1'b0;
    end else if (!ready) begin
      clr_addr <= clr_addr + KEY_W'(1);
      if (&clr_addr) ready <= 1'b1;
    end
  end

  a_distinct_writes: assert property (@(posedge clk) disable iff (!rst_n)
    (ready && we0 && we1) |-> (waddr0 != waddr1));
endmodule
