// Public memory bank: PAGES pages of one 256 x 32 BRAM each. A node of 86
// bits is moved as three 32-bit words, one per clock:
//   IDLE    : on mem_re or mem_we latch address, data and operation
//   PHASE_0 : word 0 = bits 31:0,  PHASE_1 : word 1 = bits 63:32,
//   PHASE_2 : word 2 = bits 85:64; a write ends here (mem_wdone) -> IDLE
//   DONE_READ: a read assembles the three words, mem_rdata_valid -> IDLE
// mem_busy is high outside IDLE; a new request is taken only in IDLE.
// mem_wdone comes three clocks after a write request, mem_rdata_valid
// four clocks after a read request. Address: page = mem_addr[20:13], node = mem_addr[9:4]
// (the design's physical address format); the bank's own page is page[7:2]
// and the word is {node, phase} inside that page's BRAM.
// States and word split follow the design; the page-to-bank mapping is assumed.
module mem_bank #(
  parameter int PAGES = 60
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] mem_addr,
  input  logic        mem_we,
  input  logic        mem_re,
  input  logic [85:0] mem_wdata,
  output logic [85:0] mem_rdata,
  output logic        mem_rdata_valid,
  output logic        mem_wdone,
  output logic        mem_busy
);
  typedef enum logic [2:0] {B_IDLE, B_PHASE_0, B_PHASE_1, B_PHASE_2, B_DONE_READ} bstate_e;
  bstate_e     state;
  logic        is_write;
  logic [5:0]  lpage;
  logic [5:0]  node;
  logic [85:0] wdata_q;
  logic [31:0] w0, w1;
  logic [1:0]  word;
  logic [31:0] word_wdata;
  logic [31:0] page_rdata [PAGES];
  logic [31:0] sel_rdata;

  assign mem_busy        = (state != B_IDLE);
  assign mem_wdone       = (state == B_PHASE_2) && is_write;
  assign mem_rdata_valid = (state == B_DONE_READ);
  assign sel_rdata       = page_rdata[lpage];
  assign mem_rdata       = {sel_rdata[21:0], w1, w0};

  always_comb begin
    unique case (state)
      B_PHASE_1: begin word = 2'd1; word_wdata = wdata_q[63:32]; end
      B_PHASE_2: begin word = 2'd2; word_wdata = {10'd0, wdata_q[85:64]}; end
      default:   begin word = 2'd0; word_wdata = wdata_q[31:0]; end
    endcase
  end

  for (genvar p = 0; p < PAGES; p++) begin : g_page
    logic sel, active;
    assign sel    = (lpage == 6'(p));
    assign active = (state == B_PHASE_0) || (state == B_PHASE_1) || (state == B_PHASE_2);
    bram_dp_256x32 u_page (
      .clk,
      .we   (sel && active && is_write),
      .re   (sel && active && !is_write),
      .waddr({node, word}),
      .raddr({node, word}),
      .wdata(word_wdata),
      .rdata(page_rdata[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= B_IDLE;
      is_write <= 1'b0;
      lpage    <= '0;
      node     <= '0;
      wdata_q  <= '0;
      w0       <= '0;
      w1       <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (mem_re || mem_we) begin
          is_write <= mem_we;
          lpage    <= mem_addr[20:15];
          node     <= mem_addr[9:4];
          wdata_q  <= mem_wdata;
          state    <= B_PHASE_0;
        end
        B_PHASE_0: state <= B_PHASE_1;
        B_PHASE_1: begin
          w0    <= sel_rdata;
          state <= B_PHASE_2;
        end
        B_PHASE_2: begin
          w1    <= sel_rdata;
          state <= is_write ? B_IDLE : B_DONE_READ;
        end
        B_DONE_READ: state <= B_IDLE;
        default:     state <= B_IDLE;
      endcase
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(mem_re && mem_we));
  a_no_req_busy: assert property (@(posedge clk) disable iff (!rst_n)
    mem_busy |-> !(mem_re || mem_we));
endmodule
