// Node allocator of the shared memory pool. The 240 public pages are split
// into 16 partitions of 15 pages; partition {engine, va[10]} belongs to one
// heap (the bid or ask heap of one engine). Each partition keeps a page and
// a node counter: it offers the next free node (page_o, node_o); take
// claims it and advances the node counter, and when the node counter rolls
// over the page counter advances. After the 15th page rolls over avail is
// low for good: nodes are never returned. Two ports, one per walker; they
// never claim in the same partition at once. The global page number is
// partition * 15 + page within the partition.
// Partition count, pages per partition and the counter scheme follow the
// design; the page numbering is assumed.
module partition_alloc #(
  parameter int NUM_PART       = 16,
  parameter int PAGES_PER_PART = 15,
  parameter int NODES_PER_PAGE = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [1:0][$clog2(NUM_PART)-1:0] part,
  input  logic [1:0]                      take,
  output logic [1:0]                      avail,
  output logic [1:0][7:0]                 page_o,
  output logic [1:0][5:0]                 node_o
);
  localparam int PW = $clog2(PAGES_PER_PART+1);
  logic [PW-1:0] page_cnt [NUM_PART];
  logic [5:0]    node_cnt [NUM_PART];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      avail[p]  = page_cnt[part[p]] < PW'(PAGES_PER_PART);
      page_o[p] = 8'(int'(part[p]) * PAGES_PER_PART + int'(page_cnt[part[p]]));
      node_o[p] = node_cnt[part[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PART; i++) begin
        page_cnt[i] <= '0;
        node_cnt[i] <= '0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (take[p] && avail[p]) begin
          if (node_cnt[part[p]] == 6'(NODES_PER_PAGE-1)) begin
            node_cnt[part[p]] <= '0;
            page_cnt[part[p]] <= page_cnt[part[p]] + PW'(1);
          end else begin
            node_cnt[part[p]] <= node_cnt[part[p]] + 6'd1;
          end
        end
      end
    end
  end

  a_distinct_parts: assert property (@(posedge clk) disable iff (!rst_n)
    (take[0] && take[1]) |-> (part[0] != part[1]));
endmodule
