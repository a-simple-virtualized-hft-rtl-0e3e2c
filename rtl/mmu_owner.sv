// MMU owner: shares an engine's single MMU port between its two heaps.
// While free, it forwards the bid heap's request (port a) if there is one,
// else the ask heap's (port b); ready comes straight from the MMU. Once a
// request is accepted the owner is held by that heap until the MMU answers
// (resp_valid), and the answer is routed to it alone. So each engine has at
// most one request in the MMU, which the MMU relies on. The block is named
// in the design; its priority and hold rule are this implementation's.
module mmu_owner (
  input  logic        clk,
  input  logic        rst_n,
  // port a (bid heap)
  input  logic        a_req_valid,
  input  logic [31:0] a_req_va,
  input  logic        a_req_wr,
  input  logic [85:0] a_req_wdata,
  output logic        a_req_ready,
  output logic        a_resp_valid,
  output logic [85:0] a_resp_data,
  output logic        a_resp_reject,
  // port b (ask heap)
  input  logic        b_req_valid,
  input  logic [31:0] b_req_va,
  input  logic        b_req_wr,
  input  logic [85:0] b_req_wdata,
  output logic        b_req_ready,
  output logic        b_resp_valid,
  output logic [85:0] b_resp_data,
  output logic        b_resp_reject,
  // engine port to the MMU
  output logic        mmu_req_valid,
  output logic [31:0] mmu_req_va,
  output logic        mmu_req_wr,
  output logic [85:0] mmu_req_wdata,
  input  logic        mmu_req_ready,
  input  logic [85:0] mmu_resp_data,
  input  logic        mmu_resp_valid,
  input  logic        mmu_resp_reject
);
  typedef enum logic [1:0] {O_FREE, O_A, O_B} owner_e;
  owner_e owner;
  logic   pick_a;

  assign pick_a        = a_req_valid;
  assign mmu_req_valid = (owner == O_FREE) && (a_req_valid || b_req_valid);
  assign mmu_req_va    = pick_a ? a_req_va    : b_req_va;
  assign mmu_req_wr    = pick_a ? a_req_wr    : b_req_wr;
  assign mmu_req_wdata = pick_a ? a_req_wdata : b_req_wdata;
  assign a_req_ready   = (owner == O_FREE) &&  pick_a && mmu_req_ready;
  assign b_req_ready   = (owner == O_FREE) && !pick_a && mmu_req_ready;

  assign a_resp_valid  = (owner == O_A) && mmu_resp_valid;
  assign b_resp_valid  = (owner == O_B) && mmu_resp_valid;
  assign a_resp_reject = (owner == O_A) && mmu_resp_reject;
  assign b_resp_reject = (owner == O_B) && mmu_resp_reject;
  assign a_resp_data   = mmu_resp_data;
  assign b_resp_data   = mmu_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= O_FREE;
    else unique case (owner)
      O_FREE: if (mmu_req_valid && mmu_req_ready) owner <= pick_a ? O_A : O_B;
      O_A, O_B: if (mmu_resp_valid) owner <= O_FREE;
      default: owner <= O_FREE;
    endcase
  end
endmodule
