// Round-robin arbiter. grant is one-hot and combinational: the first active
// request found when searching upward from the position after the last
// winner. When advance is high and a grant is given, the pointer moves past
// the winner on the next clock, so every requester is served in turn.
// The design only names round-robin selection; this search form is assumed.
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic         grant_valid
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr;  // highest priority position

  logic [IW-1:0] idx;

  always_comb begin
    idx         = '0;
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = ptr + IW'(k);  // N is a power of two: wraps around
      if (!grant_valid && req[idx]) begin
        grant_valid = 1'b1;
        grant_idx   = idx;
        grant[idx]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant_valid)
      ptr <= grant_idx + IW'(1);
  end

  initial assert (N == 2**IW) else $error("rr_arbiter: N must be a power of two");
endmodule
