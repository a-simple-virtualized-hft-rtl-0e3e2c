// Hardware page-table walker. Translates one virtual address at a time:
//   IDLE     : on va_valid, latch the 14-bit key va[13:0] and read the page
//              table at that key (pt_raddr is driven from va in this cycle)
//   LOOKUP   : entry valid (pt_rdata[14]) -> DONE; invalid -> ALLOCATE
//   ALLOCATE : if the requester's partition {va[13:11], va[10]} has a node
//              (alloc_avail), write the new entry and claim the node
//              (alloc) -> DONE; otherwise -> FAULT
//   DONE     : pa_valid for one clock with pa and bank_id -> IDLE
//   FAULT    : fault for one clock -> IDLE
// pa = {11'd0, page[7:0], 3'd0, node[5:0], 4'd0}. On a hit pa_valid comes
// two clocks after va_valid, on a first touch three. The states,
// transitions, entry layout and address formula follow the design. bank_id = page[1:0] and the
// alloc_part output (which partition to allocate from) are assumed.
module hptw (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        va_valid,
  input  logic [31:0] va,
  output logic        pa_valid,
  output logic [31:0] pa,
  output logic [1:0]  bank_id,
  output logic        fault,
  output logic        busy,
  output logic [13:0] pt_raddr,
  input  logic [14:0] pt_rdata,
  output logic        pt_we,
  output logic [13:0] pt_waddr,
  output logic [14:0] pt_wdata,
  input  logic        alloc_avail,
  input  logic [7:0]  alloc_page_in,
  input  logic [5:0]  alloc_node_in,
  output logic        alloc,
  output logic [7:0]  alloc_page_idx,
  output logic [5:0]  alloc_node_idx,
  output logic [3:0]  alloc_part
);
  typedef enum logic [2:0] {W_IDLE, W_LOOKUP, W_ALLOCATE, W_DONE, W_FAULT} wstate_e;
  wstate_e     state;
  logic [13:0] key;
  logic [7:0]  page_q;
  logic [5:0]  node_q;

  assign busy           = (state != W_IDLE);
  assign pt_raddr       = va[13:0];
  assign alloc_part     = key[13:10];
  assign alloc          = (state == W_ALLOCATE) && alloc_avail;
  assign alloc_page_idx = alloc_page_in;
  assign alloc_node_idx = alloc_node_in;
  assign pt_we          = alloc;
  assign pt_waddr       = key;
  assign pt_wdata       = {1'b1, alloc_page_in, alloc_node_in};
  assign pa_valid       = (state == W_DONE);
  assign fault          = (state == W_FAULT);
  assign pa             = {11'd0, page_q, 3'd0, node_q, 4'd0};
  assign bank_id        = page_q[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= W_IDLE;
      key    <= '0;
      page_q <= '0;
      node_q <= '0;
    end else begin
      unique case (state)
        W_IDLE: if (va_valid) begin
          key   <= va[13:0];
          state <= W_LOOKUP;
        end
        W_LOOKUP: begin
          if (pt_rdata[14]) begin
            page_q <= pt_rdata[13:6];
            node_q <= pt_rdata[5:0];
            state  <= W_DONE;
          end else begin
            state  <= W_ALLOCATE;
          end
        end
        W_ALLOCATE: begin
          if (alloc_avail) begin
            page_q <= alloc_page_in;
            node_q <= alloc_node_in;
            state  <= W_DONE;
          end else begin
            state  <= W_FAULT;
          end
        end
        W_DONE:  state <= W_IDLE;
        W_FAULT: state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end
endmodule
