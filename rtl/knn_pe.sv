// knn_pe: one distance processing element of the KNN rerank kernel.
//
// Each PE owns one database vector of the current batch. Every enabled cycle
// it receives one query element (shared by all PEs from the query shift
// register) and the matching element of its own vector, squares their
// difference and adds it to its accumulator. `first` marks dimension 0 and
// restarts the sum, so after DIM enabled cycles `acc` holds the squared
// Euclidean distance. Squared distance is used because it orders vectors the
// same way as the true distance.
//
// The PE with its feedback accumulator follows the kernel diagram of the
// design. Fixed-point signed elements (instead of floats) and the squared
// rather than rooted distance are this implementation's choices.
//
// Timing: `acc` is valid the cycle after the enabled cycle carrying the last
// dimension.
module knn_pe #(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DIM    = 128,
  parameter int unsigned DIST_W = 2*ELEM_W + 1 + $clog2(DIM)
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     first,
  input  logic signed [ELEM_W-1:0] q_elem,
  input  logic signed [ELEM_W-1:0] d_elem,
  output logic        [DIST_W-1:0] acc
);
  logic signed [ELEM_W:0]     diff;
  logic signed [2*ELEM_W+1:0] sq;

  always_comb begin
    diff = {q_elem[ELEM_W-1], q_elem} - {d_elem[ELEM_W-1], d_elem};
    sq   = diff * diff;
  end

  always_ff @(posedge clk) begin
    if (en) acc <= (first ? '0 : acc) + DIST_W'(unsigned'(sq));
  end
endmodule
