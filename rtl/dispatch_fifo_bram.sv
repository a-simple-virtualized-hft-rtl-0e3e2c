// Order FIFO of one stock in the dispatcher. Software writes order words
// (wr_en/wr_data) while the dispatcher is in WRITE; in DISPATCH (dispatch_en)
// the FIFO drains into its heap engine through a valid/ready output.
// The storage is a block RAM with a registered read; that read register is
// the output stage, so out_data is valid one clock after an entry is fetched
// and a ready consumer takes one word per clock. empty is high only when the
// RAM and the output register are both empty; clear flushes everything.
// Ports follow the design; depth (1792 words, seven 256-word blocks) and the
// output structure are this implementation's choices.
module dispatch_fifo_bram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1792
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             dispatch_en,
  input  logic             out_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  output logic             empty,
  input  logic             clear
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [CW-1:0]    cnt;      // words in the RAM
  logic             do_wr, fetch;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + AW'(1);
  endfunction

  assign full  = (cnt == CW'(DEPTH));
  assign empty = (cnt == '0) && !out_valid;
  assign do_wr = wr_en && !full && !clear;
  assign fetch = dispatch_en && !clear && (cnt != '0) && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
    if (fetch) out_data <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; out_valid <= 1'b0;
    end else if (clear) begin
      wp <= '0; rp <= '0; cnt <= '0; out_valid <= 1'b0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (fetch) rp <= inc(rp);
      cnt <= cnt + CW'(do_wr) - CW'(fetch);
      if (fetch)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end
endmodule
