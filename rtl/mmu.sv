// Memory management unit of the shared overflow pool. Eight requesters (the
// heap engines) send virtual-address reads and writes of 86-bit nodes.
//  1. Round robin picks up to two requesting engines per clock; their
//     requests are accepted (req_ready) and pushed into the two input FIFOs,
//     the first winner into the emptier FIFO.
//  2. Each FIFO feeds one page-table walker (hptw). The two walkers share
//     the page table and the partition allocator.
//  3. A translated request goes to the arbiter, which queues it for one of
//     the four memory banks (mem_* ports, banks outside this module) and
//     tracks it.
//  4. Answers come back from the arbiter tagged with their virtual address;
//     bits 13:11 of that address name the engine, which gets resp_valid
//     (with resp_data for a read). A walker fault (partition full) or an
//     arbiter reject is answered with resp_valid and resp_reject.
// Every engine keeps at most one request in flight, so at most eight are in
// the MMU and no FIFO can overflow. Requests are taken only after the page
// table has cleared itself following reset.
// The structure follows the design; FIFO depth, how winners are split over
// the FIFOs, and write acknowledgements are this implementation's choices.
module mmu
  import hft_pkg::*;
#(
  parameter int NUM_REQ       = 8,
  parameter int IN_FIFO_DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_REQ-1:0]            req_valid,
  input  logic [NUM_REQ-1:0][31:0]      req_va,
  input  logic [NUM_REQ-1:0]            req_wr,
  input  logic [NUM_REQ-1:0][85:0]      req_wdata,
  output logic [NUM_REQ-1:0]            req_ready,
  output logic [NUM_REQ-1:0][85:0]      resp_data,
  output logic [NUM_REQ-1:0]            resp_valid,
  output logic [NUM_REQ-1:0]            resp_reject,
  output logic [3:0][31:0]              mem_addr,
  output logic [3:0]                    mem_we,
  output logic [3:0]                    mem_re,
  output logic [3:0][85:0]              mem_wdata,
  input  logic [3:0][85:0]              mem_rdata,
  input  logic [3:0]                    mem_rdata_valid,
  input  logic [3:0]                    mem_busy,
  input  logic [3:0]                    mem_wdone,
  output logic                          idle
);
  localparam int IW = $clog2(NUM_REQ);
  typedef struct packed {
    logic [31:0] va;
    logic        wr;
    logic [85:0] wdata;
  } vreq_t;

  // ---------------- round robin: two winners ----------------
  logic [IW-1:0] ptr;
  logic          win_a_v, win_b_v;
  logic [IW-1:0] win_a, win_b;
  logic [3:0]    fcount [2];
  logic [1:0]    fempty;
  logic          pt_ready;
  logic          sel_a;        // FIFO that takes winner a
  logic [1:0]    room;

  logic [IW-1:0] idx;

  always_comb begin
    idx = '0;
    win_a_v = 1'b0; win_b_v = 1'b0; win_a = '0; win_b = '0;
    for (int k = 0; k < NUM_REQ; k++) begin
      idx = ptr + IW'(k);  // NUM_REQ is 8: wraps around
      if (req_valid[idx]) begin
        if (!win_a_v)      begin win_a_v = 1'b1; win_a = idx; end
        else if (!win_b_v) begin win_b_v = 1'b1; win_b = idx; end
      end
    end
  end

  assign sel_a   = (fcount[1] < fcount[0]);
  assign room[0] = pt_ready && (fcount[0] < 4'(IN_FIFO_DEPTH));
  assign room[1] = pt_ready && (fcount[1] < 4'(IN_FIFO_DEPTH));

  logic          push_a, push_b;
  assign push_a = win_a_v && room[sel_a];
  assign push_b = win_b_v && push_a && room[!sel_a];

  always_comb begin
    req_ready = '0;
    if (push_a) req_ready[win_a] = 1'b1;
    if (push_b) req_ready[win_b] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (push_b) ptr <= win_b + IW'(1);
    else if (push_a) ptr <= win_a + IW'(1);
  end

  // ---------------- input FIFOs and walkers ----------------
  vreq_t      fin [2];
  vreq_t      fout [2];
  logic [1:0] fwr, frd;

  always_comb begin
    fin[0] = '0; fin[1] = '0; fwr = '0;
    if (push_a) begin
      fwr[sel_a] = 1'b1;
      fin[sel_a] = '{va: req_va[win_a], wr: req_wr[win_a], wdata: req_wdata[win_a]};
    end
    if (push_b) begin
      fwr[!sel_a] = 1'b1;
      fin[!sel_a] = '{va: req_va[win_b], wr: req_wr[win_b], wdata: req_wdata[win_b]};
    end
  end

  logic [1:0]       pa_valid, fault, busy, pt_we, alloc, acc, rej;
  logic [1:0][31:0] pa;
  logic [1:0][1:0]  bank_id;
  logic [1:0][13:0] pt_raddr, pt_waddr;
  logic [1:0][14:0] pt_rdata, pt_wdata;
  logic [1:0]       alloc_avail;
  logic [1:0][7:0]  alloc_page, alloc_page_idx;
  logic [1:0][5:0]  alloc_node, alloc_node_idx;
  logic [1:0][3:0]  alloc_part;

  for (genvar w = 0; w < 2; w++) begin : g_walk
    mmu_fifo #(.WIDTH($bits(vreq_t)), .DEPTH(IN_FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(fwr[w]), .wr_data(fin[w]),
      .rd_en(frd[w]), .rd_data(fout[w]),
      .empty(fempty[w]), .count(fcount[w])
    );
    // the head stays in the FIFO while it is walked; it leaves when the
    // walk ends (translated or faulted)
    assign frd[w] = pa_valid[w] || fault[w];

    hptw u_walk (
      .clk, .rst_n,
      .va_valid(!fempty[w] && !busy[w]),
      .va(fout[w].va),
      .pa_valid(pa_valid[w]), .pa(pa[w]), .bank_id(bank_id[w]),
      .fault(fault[w]), .busy(busy[w]),
      .pt_raddr(pt_raddr[w]), .pt_rdata(pt_rdata[w]),
      .pt_we(pt_we[w]), .pt_waddr(pt_waddr[w]), .pt_wdata(pt_wdata[w]),
      .alloc_avail(alloc_avail[w]), .alloc_page_in(alloc_page[w]), .alloc_node_in(alloc_node[w]),
      .alloc(alloc[w]), .alloc_page_idx(alloc_page_idx[w]), .alloc_node_idx(alloc_node_idx[w]),
      .alloc_part(alloc_part[w])
    );
  end

  page_table u_pt (
    .clk, .rst_n,
    .raddr0(pt_raddr[0]), .rdata0(pt_rdata[0]),
    .raddr1(pt_raddr[1]), .rdata1(pt_rdata[1]),
    .we0(pt_we[0]), .waddr0(pt_waddr[0]), .wdata0(pt_wdata[0]),
    .we1(pt_we[1]), .waddr1(pt_waddr[1]), .wdata1(pt_wdata[1]),
    .ready(pt_ready)
  );

  partition_alloc u_alloc (
    .clk, .rst_n,
    .part(alloc_part), .take(alloc),
    .avail(alloc_avail), .page_o(alloc_page), .node_o(alloc_node)
  );

  // ---------------- arbiter and banks ----------------
  logic [3:0][85:0] a_rdata;
  logic [3:0][31:0] a_rdata_va;
  logic [3:0]       a_rdata_valid, a_rdata_wr;

  arbiter u_arb (
    .clk, .rst_n,
    .ptw0_valid(pa_valid[0]), .ptw0_va(fout[0].va), .ptw0_pa(pa[0]), .ptw0_bank_id(bank_id[0]),
    .ptw0_wr(fout[0].wr), .ptw0_wdata(fout[0].wdata),
    .ptw1_valid(pa_valid[1]), .ptw1_va(fout[1].va), .ptw1_pa(pa[1]), .ptw1_bank_id(bank_id[1]),
    .ptw1_wr(fout[1].wr), .ptw1_wdata(fout[1].wdata),
    .ptw0_accept(acc[0]), .ptw0_reject(rej[0]), .ptw1_accept(acc[1]), .ptw1_reject(rej[1]),
    .rdata(a_rdata), .rdata_va(a_rdata_va), .rdata_valid(a_rdata_valid), .rdata_wr(a_rdata_wr),
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata, .mem_rdata_valid, .mem_wdone, .mem_busy
  );

  // ---------------- answers back to the requesters ----------------
  always_comb begin
    resp_valid  = '0;
    resp_reject = '0;
    resp_data   = '0;
    for (int b = 0; b < 4; b++) begin
      if (a_rdata_valid[b]) begin
        resp_valid[a_rdata_va[b][13:11]] = 1'b1;
        resp_data[a_rdata_va[b][13:11]]  = a_rdata[b];
      end
    end
    for (int w = 0; w < 2; w++) begin
      if (fault[w] || rej[w]) begin
        resp_valid[fout[w].va[13:11]]  = 1'b1;
        resp_reject[fout[w].va[13:11]] = 1'b1;
      end
    end
  end

  // nothing queued or walking; banks may still be finishing
  assign idle = (&fempty) && !(|busy);

  initial assert (NUM_REQ == 8) else $error("mmu: engine id is va[13:11]");
endmodule
