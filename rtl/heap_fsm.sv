// One binary heap of orders (max-heap of bids when IS_MAX, min-heap of asks
// otherwise), kept in array order: children of index i are 2i+1 and 2i+2.
// Commands (cmd_valid/cmd_ready, then one cmd_done pulse):
//   PUSH   : PUSH_LAUNCH -> PUSH_SIFT (read parent, move it down while the
//            new node is better) -> PUSH_FINAL (write the new node)
//            An empty heap skips the sift.
//   POP    : POP_LAUNCH (one-node heap: done at once) -> POP_FETCH (read
//            root and last leaf) -> POP_SIFT (read both children, move the
//            better one up while it beats the former leaf) -> POP_FINAL.
//            cmd_root_out returns the removed root.
//   PEEK   : root from the top-3 cache, or PEEK_READ on a miss.
//   UPDATE : UPDATE_WRITE overwrites the root (quantity after a partial fill).
// Storage: indices 0..PRIV_DEPTH-1 in the private page (priv_*, one-clock
// read), deeper ones through the MMU at virtual address
// {18'b0, ENGINE_ID, IS_MAX, index-PRIV_DEPTH} (virt_*, valid/ready request,
// then one response). Indices 0..2 are also held in a write-through cache.
// Each memory access takes 2 clocks on a cache or private hit and as long as
// the MMU needs otherwise. A push whose new leaf the MMU refuses (overflow
// partition full) changes nothing and raises cmd_rejected with cmd_done; any
// other refused access is retried.
// States, commands, port widths and the top-3 cache follow the design.
// Command encoding, tie-breaking on timestamp, the address layout and the
// reject handling are this implementation's choices.
module heap_fsm
  import hft_pkg::*;
#(
  parameter bit          IS_MAX     = 1'b1,
  parameter logic [2:0]  ENGINE_ID  = 3'd0,
  parameter int          PRIV_DEPTH = 64,
  parameter int          VIRT_NODES = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  logic [1:0]        cmd_op,
  input  logic [85:0]       cmd_data_in,
  output logic              cmd_ready,
  output logic              cmd_done,
  output logic [85:0]       cmd_root_out,
  output logic              cmd_rejected,
  output logic [13:0]       size_out,
  output logic              priv_we,
  output logic              priv_re,
  output logic [$clog2(PRIV_DEPTH)-1:0] priv_addr,
  output logic [85:0]       priv_wdata,
  input  logic [85:0]       priv_rdata,
  output logic              virt_req_valid,
  output logic [31:0]       virt_req_va,
  output logic              virt_req_wr,
  output logic [85:0]       virt_req_wdata,
  input  logic              virt_req_ready,
  input  logic              virt_resp_valid,
  input  logic [85:0]       virt_resp_data,
  input  logic              virt_resp_reject
);
  localparam int MAX_NODES = PRIV_DEPTH + VIRT_NODES;
  localparam int PAW       = $clog2(PRIV_DEPTH);

  typedef enum logic [3:0] {
    S_IDLE, PUSH_LAUNCH, PUSH_SIFT, PUSH_FINAL, POP_LAUNCH, POP_FETCH,
    POP_SIFT, POP_FINAL, PEEK_READ, UPDATE_WRITE, S_DONE
  } hstate_e;

  // ---------------- memory access unit ----------------
  typedef enum logic [1:0] {A_IDLE, A_LOCAL, A_VREQ, A_VRESP} astate_e;
  astate_e     astate;
  logic        acc_go, acc_wr;
  logic [13:0] acc_idx;
  node_t       acc_wdata;
  logic        acc_done, acc_rej;
  node_t       acc_rdata;
  node_t       cache [3];
  logic [2:0]  cache_valid;
  logic        from_cache;
  node_t       cache_q;
  logic [13:0] vidx;

  assign vidx = acc_idx - 14'(PRIV_DEPTH);

  assign priv_addr  = PAW'(acc_idx);
  assign priv_wdata = acc_wdata;
  assign priv_we    = acc_go && acc_wr && (acc_idx < 14'(PRIV_DEPTH));
  assign priv_re    = acc_go && !acc_wr && (acc_idx < 14'(PRIV_DEPTH)) &&
                      !(acc_idx < 14'd3 && cache_valid[acc_idx[1:0]]);

  assign acc_done  = (astate == A_LOCAL) || (astate == A_VRESP && virt_resp_valid);
  assign acc_rej   = (astate == A_VRESP) && virt_resp_reject;
  assign acc_rdata = (astate == A_VRESP) ? node_t'(virt_resp_data) :
                     from_cache          ? cache_q : node_t'(priv_rdata);
  assign virt_req_valid = (astate == A_VREQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      astate         <= A_IDLE;
      cache_valid    <= '0;
      from_cache     <= 1'b0;
      cache_q        <= '0;
      virt_req_va    <= '0;
      virt_req_wr    <= 1'b0;
      virt_req_wdata <= '0;
      for (int i = 0; i < 3; i++) cache[i] <= '0;
    end else begin
      unique case (astate)
        A_IDLE: if (acc_go) begin
          if (acc_idx < 14'(PRIV_DEPTH)) begin
            astate     <= A_LOCAL;
            from_cache <= !acc_wr && acc_idx < 14'd3 && cache_valid[acc_idx[1:0]];
            if (acc_idx < 14'd3) begin
              cache_q <= cache[acc_idx[1:0]];
              if (acc_wr) begin
                cache[acc_idx[1:0]]       <= acc_wdata;
                cache_valid[acc_idx[1:0]] <= 1'b1;
              end
            end
          end else begin
            astate         <= A_VREQ;
            virt_req_va    <= {18'd0, ENGINE_ID, IS_MAX, vidx[9:0]};
            virt_req_wr    <= acc_wr;
            virt_req_wdata <= acc_wdata;
          end
        end
        A_LOCAL: astate <= A_IDLE;
        A_VREQ:  if (virt_req_ready) astate <= A_VRESP;
        A_VRESP: if (virt_resp_valid) astate <= A_IDLE;
        default: astate <= A_IDLE;
      endcase
    end
  end

  // ---------------- heap control ----------------
  hstate_e     state;
  logic [2:0]  step;
  logic [13:0] size, hole, win_idx;
  node_t       node, root_q, lnode, rnode, wnode;
  logic        rejected;
  logic [13:0] parent, lidx, ridx;

  assign parent   = (hole - 14'd1) >> 1;
  assign lidx     = {hole[12:0], 1'b1};
  assign ridx     = lidx + 14'd1;

  assign cmd_ready    = (state == S_IDLE);
  assign cmd_done     = (state == S_DONE);
  assign cmd_root_out = root_q;
  assign cmd_rejected = rejected;
  assign size_out     = size;

  // request for the access unit, decided by state and step
  always_comb begin
    acc_go    = 1'b0;
    acc_wr    = 1'b0;
    acc_idx   = '0;
    acc_wdata = node;
    unique case (state)
      PUSH_SIFT: begin
        if (step == 3'd0) begin acc_go = 1'b1; acc_idx = parent; end
        if (step == 3'd2) begin acc_go = 1'b1; acc_wr = 1'b1; acc_idx = hole; acc_wdata = wnode; end
      end
      PUSH_FINAL, POP_FINAL:
        if (step == 3'd0) begin acc_go = 1'b1; acc_wr = 1'b1; acc_idx = hole; end
      POP_FETCH: begin
        if (step == 3'd0) begin acc_go = 1'b1; acc_idx = '0; end
        if (step == 3'd2) begin acc_go = 1'b1; acc_idx = size - 14'd1; end
      end
      POP_SIFT: begin
        if (step == 3'd0 && lidx < size) begin acc_go = 1'b1; acc_idx = lidx; end
        if (step == 3'd2) begin acc_go = 1'b1; acc_idx = ridx; end
        if (step == 3'd5) begin acc_go = 1'b1; acc_wr = 1'b1; acc_idx = hole; acc_wdata = wnode; end
      end
      PEEK_READ:
        if (step == 3'd0) begin acc_go = 1'b1; acc_idx = '0; end
      UPDATE_WRITE:
        if (step == 3'd0) begin acc_go = 1'b1; acc_wr = 1'b1; acc_idx = '0; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      size     <= '0;
      hole     <= '0;
      win_idx  <= '0;
      node     <= '0;
      root_q   <= '0;
      lnode    <= '0;
      rnode    <= '0;
      wnode    <= '0;
      rejected <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          rejected <= 1'b0;
          step     <= '0;
          node     <= node_t'(cmd_data_in);
          unique case (heap_op_e'(cmd_op))
            OP_PUSH:   state <= PUSH_LAUNCH;
            OP_POP:    state <= POP_LAUNCH;
            OP_PEEK:   if (cache_valid[0]) begin
                         root_q <= cache[0];
                         state  <= S_DONE;
                       end else state <= PEEK_READ;
            OP_UPDATE: state <= UPDATE_WRITE;
          endcase
        end

        PUSH_LAUNCH: begin
          hole <= size;
          step <= '0;
          if (size == 14'(MAX_NODES)) begin
            rejected <= 1'b1;
            state    <= S_DONE;
          end else if (size == '0) state <= PUSH_FINAL;
          else                     state <= PUSH_SIFT;
        end

        PUSH_SIFT: unique case (step)
          3'd1: if (acc_done) begin          // parent read back
            wnode <= acc_rdata;
            if (node_better(node, acc_rdata, IS_MAX)) step <= 3'd2;
            else begin step <= '0; state <= PUSH_FINAL; end
          end
          3'd3: if (acc_done) begin          // parent moved down into hole
            if (acc_rej && hole == size) begin
              rejected <= 1'b1;
              state    <= S_DONE;
            end else if (acc_rej) begin
              step <= 3'd2;                  // retry
            end else begin
              hole <= parent;
              step <= '0;
              if (parent == '0) state <= PUSH_FINAL;
            end
          end
          default: step <= step + 3'd1;      // steps 0 and 2 issue
        endcase

        PUSH_FINAL: begin
          if (step == 3'd0) step <= 3'd1;
          else if (acc_done) begin
            if (acc_rej && hole == size) begin
              rejected <= 1'b1;
              state    <= S_DONE;
            end else if (acc_rej) begin
              step <= '0;
            end else begin
              size  <= size + 14'd1;
              state <= S_DONE;
            end
          end
        end

        POP_LAUNCH: begin
          step <= '0;
          if (size == '0) state <= S_DONE;
          else if (size == 14'd1) begin
            root_q <= cache[0];
            size   <= '0;
            state  <= S_DONE;
          end else state <= POP_FETCH;
        end

        POP_FETCH: unique case (step)
          3'd1: if (acc_done) step <= acc_rej ? 3'd0 : 3'd2;
          3'd3: if (acc_done) begin
            if (acc_rej) step <= 3'd2;
            else begin
              node  <= acc_rdata;
              size  <= size - 14'd1;
              hole  <= '0;
              step  <= '0;
              state <= POP_SIFT;
            end
          end
          default: step <= step + 3'd1;
        endcase

        POP_SIFT: unique case (step)
          3'd0: if (lidx < size) step <= 3'd1;
                else state <= POP_FINAL;
          3'd1: if (acc_done) begin
            if (acc_rej) step <= 3'd0;
            else begin
              lnode <= acc_rdata;
              step  <= (ridx < size) ? 3'd2 : 3'd4;
            end
          end
          3'd2: step <= 3'd3;
          3'd3: if (acc_done) begin
            if (acc_rej) step <= 3'd2;
            else begin
              rnode <= acc_rdata;
              step  <= 3'd4;
            end
          end
          3'd4: begin                        // pick the better child
            if (ridx < size && node_better(rnode, lnode, IS_MAX)) begin
              wnode <= rnode; win_idx <= ridx;
              if (node_better(rnode, node, IS_MAX)) step <= 3'd5;
              else begin step <= '0; state <= POP_FINAL; end
            end else begin
              wnode <= lnode; win_idx <= lidx;
              if (node_better(lnode, node, IS_MAX)) step <= 3'd5;
              else begin step <= '0; state <= POP_FINAL; end
            end
          end
          3'd5: step <= 3'd6;
          3'd6: if (acc_done) begin
            if (acc_rej) step <= 3'd5;
            else begin
              hole <= win_idx;
              step <= '0;
            end
          end
          default: step <= '0;
        endcase

        POP_FINAL: begin
          if (step == 3'd0) step <= 3'd1;
          else if (acc_done) begin
            if (acc_rej) step <= '0;
            else state <= S_DONE;
          end
        end

        PEEK_READ: begin
          if (step == 3'd0) step <= 3'd1;
          else if (acc_done) begin
            if (acc_rej) step <= '0;
            else begin
              root_q <= acc_rdata;
              state  <= S_DONE;
            end
          end
        end

        UPDATE_WRITE: begin
          if (step == 3'd0) step <= 3'd1;
          else if (acc_done) begin
            if (acc_rej) step <= '0;
            else state <= S_DONE;
          end
        end

        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      // root returned by POP_FETCH step 1
      if (state == POP_FETCH && step == 3'd1 && acc_done && !acc_rej) root_q <= acc_rdata;
    end
  end

  a_go_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    acc_go |-> astate == A_IDLE);
  a_size_bound: assert property (@(posedge clk) disable iff (!rst_n)
    size <= 14'(MAX_NODES));
endmodule
