// Physical-side arbiter of the MMU. Each clock it takes up to two translated
// requests, one from each page-table walker, and queues each in the
// dual-write FIFO of its memory bank (bank_id). A request is accepted
// (ptwN_accept) when that queue has room and rejected (ptwN_reject) when it
// is full. Each bank is fed from its queue whenever it is not busy: the
// request is issued as a one-clock mem_re or mem_we, and its virtual address
// and kind are pushed into the bank's tracking FIFO. Banks answer in order,
// so when a bank reports read data (mem_rdata_valid) or a finished write
// (mem_wdone), the tracking FIFO's head gives the virtual address the answer
// belongs to: rdata_#, rdata_va_# and rdata_valid_# present it for one clock
// (rdata_wr_# tells a write acknowledgement from read data).
// The FIFO structure follows the design; the accept/reject rule, queue
// depth and write acknowledgements are this implementation's choices.
module arbiter #(
  parameter int QDEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ptw0_valid,
  input  logic [31:0]      ptw0_va,
  input  logic [31:0]      ptw0_pa,
  input  logic [1:0]       ptw0_bank_id,
  input  logic             ptw0_wr,
  input  logic [85:0]      ptw0_wdata,
  input  logic             ptw1_valid,
  input  logic [31:0]      ptw1_va,
  input  logic [31:0]      ptw1_pa,
  input  logic [1:0]       ptw1_bank_id,
  input  logic             ptw1_wr,
  input  logic [85:0]      ptw1_wdata,
  output logic             ptw0_accept,
  output logic             ptw0_reject,
  output logic             ptw1_accept,
  output logic             ptw1_reject,
  output logic [3:0][85:0] rdata,
  output logic [3:0][31:0] rdata_va,
  output logic [3:0]       rdata_valid,
  output logic [3:0]       rdata_wr,
  output logic [3:0][31:0] mem_addr,
  output logic [3:0]       mem_we,
  output logic [3:0]       mem_re,
  output logic [3:0][85:0] mem_wdata,
  input  logic [3:0][85:0] mem_rdata,
  input  logic [3:0]       mem_rdata_valid,
  input  logic [3:0]       mem_wdone,
  input  logic [3:0]       mem_busy
);
  typedef struct packed {
    logic [31:0] va;
    logic [31:0] pa;
    logic        wr;
    logic [85:0] wdata;
  } preq_t;
  typedef struct packed {
    logic        wr;
    logic [31:0] va;
  } track_t;

  preq_t p0, p1;
  assign p0 = '{va: ptw0_va, pa: ptw0_pa, wr: ptw0_wr, wdata: ptw0_wdata};
  assign p1 = '{va: ptw1_va, pa: ptw1_pa, wr: ptw1_wr, wdata: ptw1_wdata};

  logic [3:0] q_full, q_empty, t_full, t_empty, issue, answer;
  preq_t      q_head [4];
  track_t     t_head [4];

  assign ptw0_accept = ptw0_valid && !q_full[ptw0_bank_id];
  assign ptw0_reject = ptw0_valid &&  q_full[ptw0_bank_id];
  assign ptw1_accept = ptw1_valid && !q_full[ptw1_bank_id];
  assign ptw1_reject = ptw1_valid &&  q_full[ptw1_bank_id];

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [$clog2(QDEPTH+1)-1:0] q_count;

    dual_write_fifo #(.WIDTH($bits(preq_t)), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .wr0_en  (ptw0_accept && ptw0_bank_id == 2'(b)),
      .wr0_data(p0),
      .wr1_en  (ptw1_accept && ptw1_bank_id == 2'(b)),
      .wr1_data(p1),
      .rd_en   (issue[b]),
      .rd_data (q_head[b]),
      .empty   (q_empty[b]),
      .full    (q_full[b]),
      .count   (q_count)
    );

    // issue only when the bank is idle and was not just started
    logic started;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) started <= 1'b0;
      else        started <= issue[b];

    assign issue[b]     = !q_empty[b] && !mem_busy[b] && !started && !t_full[b];
    assign mem_addr[b]  = q_head[b].pa;
    assign mem_wdata[b] = q_head[b].wdata;
    assign mem_we[b]    = issue[b] &&  q_head[b].wr;
    assign mem_re[b]    = issue[b] && !q_head[b].wr;

    assign answer[b] = mem_rdata_valid[b] || mem_wdone[b];

    track_t t_din;
    assign t_din = '{wr: q_head[b].wr, va: q_head[b].va};

    tracking_fifo #(.WIDTH($bits(track_t)), .DEPTH(QDEPTH)) u_track (
      .clk, .rst_n,
      .push (issue[b]),
      .din  (t_din),
      .pop  (answer[b]),
      .dout (t_head[b]),
      .full (t_full[b]),
      .empty(t_empty[b])
    );

    assign rdata[b]       = mem_rdata[b];
    assign rdata_va[b]    = t_head[b].va;
    assign rdata_wr[b]    = t_head[b].wr;
    assign rdata_valid[b] = answer[b] && !t_empty[b];
  end
endmodule
