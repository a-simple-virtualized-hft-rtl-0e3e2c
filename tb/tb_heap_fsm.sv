// Testbench for heap_fsm (bid max-heap and, in a second instance, ask
// min-heap), each with a private page and a virtual-memory model here that
// answers after a random delay and refuses new nodes beyond VCAP. Random
// pushes, pops, peeks and root updates are compared with a list model of
// the book (best price first, then earliest timestamp). Heaps grow well past
// the 64-node private page; the last pushes hit the overflow limit and must
// be refused without changing the heap. Peeks must hit the top-3 cache and
// finish one clock after they are accepted.
`timescale 1ns/1ps
module tb_heap_fsm;
  import hft_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(2000000)

  localparam int VCAP = 200;   // virtual nodes the memory model accepts per heap
  logic rst_n;

  logic [1:0]        cv, crdy, cdone, crej;
  logic [1:0][1:0]   cop;
  logic [1:0][85:0]  cdin, croot;
  logic [1:0][13:0]  csize;
  logic [1:0]        pwe, pre;
  logic [1:0][5:0]   paddr;
  logic [1:0][85:0]  pwd, prd;
  logic [1:0]        vv, vwr, vrdy, vrv, vrj;
  logic [1:0][31:0]  vva;
  logic [1:0][85:0]  vwd, vrd;
  logic [85:0]       vmem [2][int];
  int                vdelay [2];
  logic              vbusy [2];
  int                rejects, peeks, virt_ops;

  for (genvar h = 0; h < 2; h++) begin : g_h
    heap_fsm #(.IS_MAX(h == 0), .ENGINE_ID(3'd5)) dut (.clk, .rst_n,
      .cmd_valid(cv[h]), .cmd_op(cop[h]), .cmd_data_in(cdin[h]), .cmd_ready(crdy[h]),
      .cmd_done(cdone[h]), .cmd_root_out(croot[h]), .cmd_rejected(crej[h]), .size_out(csize[h]),
      .priv_we(pwe[h]), .priv_re(pre[h]), .priv_addr(paddr[h]), .priv_wdata(pwd[h]), .priv_rdata(prd[h]),
      .virt_req_valid(vv[h]), .virt_req_va(vva[h]), .virt_req_wr(vwr[h]), .virt_req_wdata(vwd[h]),
      .virt_req_ready(vrdy[h]), .virt_resp_valid(vrv[h]), .virt_resp_data(vrd[h]), .virt_resp_reject(vrj[h]));
    priv_bram u_p (.clk, .we(pwe[h]), .re(pre[h]), .addr(paddr[h]), .wdata(pwd[h]), .rdata(prd[h]));

    // virtual memory model: one request at a time, random latency
    logic [31:0] lva; logic lwr; logic [85:0] lwd;
    assign vrdy[h] = !vbusy[h];
    always @(posedge clk) begin
      vrv[h] <= 0; vrj[h] <= 0;
      if (!rst_n) begin vbusy[h] <= 0; end
      else if (vv[h] && vrdy[h]) begin
        vbusy[h] <= 1; lva <= vva[h]; lwr <= vwr[h]; lwd <= vwd[h]; vdelay[h] <= $urandom % 5;
        `CHECK(vva[h][31:14] == 0 && vva[h][13:11] == 3'd5 && vva[h][10] == (h == 0), "virtual address layout")
        virt_ops++;
      end else if (vbusy[h]) begin
        if (vdelay[h] > 0) vdelay[h] <= vdelay[h] - 1;
        else begin
          vbusy[h] <= 0; vrv[h] <= 1;
          if (lwr) begin
            if (!vmem[h].exists(int'(lva)) && vmem[h].size() >= VCAP) vrj[h] <= 1;
            else vmem[h][int'(lva)] = lwd;
          end else begin
            `CHECK(vmem[h].exists(int'(lva)), "read of a written virtual node")
            vrd[h] <= vmem[h][int'(lva)];
          end
        end
      end
    end
  end

  node_t book [2][$];
  int    ts_cnt;

  function automatic int best(int h);
    int b;
    b = 0;
    for (int i = 1; i < book[h].size(); i++)
      if (node_better(book[h][i], book[h][b], h == 0)) b = i;
    return b;
  endfunction

  task automatic cmd(int h, heap_op_e op, node_t d, output node_t r, output bit rej, output int lat);
    @(negedge clk);
    cv[h] = 1; cop[h] = op; cdin[h] = d;
    do @(posedge clk); while (!crdy[h]);
    #1 cv[h] = 0; lat = 0;
    while (!cdone[h]) begin @(posedge clk); #1; lat++; end
    r = node_t'(croot[h]); rej = crej[h];
  endtask

  task automatic run(int h, int n_ops, int push_pct);
    node_t r, d;
    bit rej;
    int lat, b;
    for (int n = 0; n < n_ops; n++) begin
      int dice;
      dice = $urandom % 100;
      if (dice < push_pct || book[h].size() == 0) begin
        d.oid = 22'(n); d.qty = 16'($urandom % 99 + 1); d.price = 16'(1400 + $urandom % 60);
        d.ts = 32'(ts_cnt++);
        cmd(h, OP_PUSH, d, r, rej, lat);
        if (rej) rejects++;
        else book[h].push_back(d);
        `CHECK(int'(csize[h]) == book[h].size(), "size after push")
      end else if (dice < push_pct + 10) begin
        cmd(h, OP_PEEK, '0, r, rej, lat);
        b = best(h);
        `CHECK(r == book[h][b], "peek returns best order")
        `CHECK(lat == 0, "peek hits the top-3 cache")
        peeks++;
      end else if (dice < push_pct + 15) begin
        b = best(h);
        d = book[h][b]; d.qty = 16'($urandom % 99 + 1);
        cmd(h, OP_UPDATE, d, r, rej, lat);
        book[h][b] = d;
      end else begin
        b = best(h);
        cmd(h, OP_POP, '0, r, rej, lat);
        `CHECK(r == book[h][b], "pop returns best order")
        book[h].delete(b);
        `CHECK(int'(csize[h]) == book[h].size(), "size after pop")
      end
    end
  endtask

  task automatic drain(int h);
    node_t r;
    bit rej;
    int lat, b;
    while (book[h].size() > 0) begin
      b = best(h);
      cmd(h, OP_POP, '0, r, rej, lat);
      `CHECK(r == book[h][b], "drain pops in priority order")
      book[h].delete(b);
    end
  endtask

  initial begin
    rst_n = 0; cv = 0; cop = '0; cdin = '0; ts_cnt = 1; rejects = 0; peeks = 0; virt_ops = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin run(0, 800, 55); run(0, 400, 100); run(0, 300, 0); drain(0); end
      begin run(1, 800, 55); run(1, 400, 100); run(1, 300, 0); drain(1); end
    join
    `CHECK(rejects > 0, "overflow limit reached")
    `CHECK(virt_ops > 500, "virtual memory used")
    `CHECK(csize[0] == 0 && csize[1] == 0, "both heaps empty at the end")
    `TB_FINISH
  end
endmodule
