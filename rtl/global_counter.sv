// Global time base: a free-running 32-bit cycle counter. Every engine stamps
// arriving orders and emitted trades with its value, which gives price-time
// priority a total order inside an engine. Cleared by reset, then counts up
// by one every clock and wraps at 2^32. Resetting to zero is assumed.
module global_counter (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 32'd1;
  end
endmodule
