// knn_topk_sort: top-K partial sort queue of the KNN rerank kernel.
//
// Keeps the K smallest distances (with their vector indices) seen since the
// last `clr`. The queue is a column of K registers, slot 1 at the top. Two
// arrays of compare-and-swap cells work on it in alternate cycles:
//   right-side cycles: (input, slot 1), (slot 2, slot 3), (slot 4, slot 5) ...
//   left-side  cycles: (slot 1, slot 2), (slot 3, slot 4) ...
// Each swap cell moves the larger distance up, towards slot 1, so the largest
// kept distance rises to the top. On a right-side cycle a pushed candidate is
// compared with slot 1: if it is smaller it replaces slot 1 and the old top
// (the worst of the kept K) is dropped; otherwise the candidate is dropped.
// The new entry then sinks one slot per cycle to its place while later
// candidates follow two slots behind it.
//
// Interface: `push_ready` is high on right-side cycles only, so the queue
// takes at most one candidate every two cycles. After the last push the
// queue is fully ordered 2*K cycles later; then slot K (out index K-1)
// holds the smallest distance and slot 1 (out index 0) the largest kept one.
// Empty slots hold distance all-ones and `out_vld` 0.
//
// The swap arrays, their odd/even alternation and the push rate of one
// candidate per two cycles follow the design; which side moves on which
// cycle and the direction of the swaps are this implementation's reading.
module knn_topk_sort #(
  parameter int unsigned K      = 10,
  parameter int unsigned DIST_W = 40,
  parameter int unsigned IDX_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              push_valid,
  output logic              push_ready,
  input  logic [DIST_W-1:0] push_dist,
  input  logic [IDX_W-1:0]  push_idx,
  output logic [DIST_W-1:0] out_dist [K],
  output logic [IDX_W-1:0]  out_idx  [K],
  output logic              out_vld  [K]
);
  typedef struct packed {
    logic              vld;
    logic [DIST_W-1:0] dv;
    logic [IDX_W-1:0]  idx;
  } entry_t;

  localparam entry_t EMPTY = '{vld: 1'b0, dv: '1, idx: '0};

  entry_t q [K];       // q[0] is slot 1 (top)
  logic   right;       // 1: right-side swap cycle

  assign push_ready = right;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      right <= 1'b1;
      for (int i = 0; i < K; i++) q[i] <= EMPTY;
    end else if (clr) begin
      right <= 1'b1;
      for (int i = 0; i < K; i++) q[i] <= EMPTY;
    end else begin
      right <= !right;
      if (right) begin
        // input cell against the top slot
        if (push_valid && push_dist < q[0].dv)
          q[0] <= '{vld: 1'b1, dv: push_dist, idx: push_idx};
        // slot pairs (2,3), (4,5), ... -> indices (1,2), (3,4), ...
        for (int i = 1; i + 1 < K; i += 2)
          if (q[i+1].dv > q[i].dv) begin
            q[i]   <= q[i+1];
            q[i+1] <= q[i];
          end
      end else begin
        // slot pairs (1,2), (3,4), ... -> indices (0,1), (2,3), ...
        for (int i = 0; i + 1 < K; i += 2)
          if (q[i+1].dv > q[i].dv) begin
            q[i]   <= q[i+1];
            q[i+1] <= q[i];
          end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      out_dist[i] = q[i].dv;
      out_idx[i]  = q[i].idx;
      out_vld[i]  = q[i].vld;
    end
  end
endmodule
