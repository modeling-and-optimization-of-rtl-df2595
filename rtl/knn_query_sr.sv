// knn_query_sr: main query shift register of the KNN rerank kernel.
//
// Holds the DIM elements of the query vector. It is loaded one memory beat
// (EPB elements) at a time: each load shifts the register down by EPB and puts
// the new beat at the far end, so after DIM/EPB beats the first element of the
// first beat sits at the head. During distance computation `rot` rotates the
// register by one element per cycle, so `head` walks through the query
// elements 0, 1, 2, ... and wraps back to element 0 after DIM rotations, ready
// for the next batch. The head is wired to every PE.
//
// A shift register shared by all PEs is the design's; the beat-wise load
// and the rotation back to element 0 are this implementation's choices.
//
// Timing: `head` changes the cycle after a `rot` or `ld` cycle.
module knn_query_sr #(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DIM    = 128,
  parameter int unsigned EPB    = 32     // elements per load beat
) (
  input  logic                     clk,
  input  logic                     ld,
  input  logic [EPB*ELEM_W-1:0]    ld_data,
  input  logic                     rot,
  output logic signed [ELEM_W-1:0] head
);
  logic [ELEM_W-1:0] q [DIM];

  always_ff @(posedge clk) begin
    if (ld) begin
      for (int i = 0; i < DIM - EPB; i++) q[i] <= q[i+EPB];
      for (int j = 0; j < EPB; j++) q[DIM-EPB+j] <= ld_data[j*ELEM_W +: ELEM_W];
    end else if (rot) begin
      for (int i = 0; i < DIM - 1; i++) q[i] <= q[i+1];
      q[DIM-1] <= q[0];
    end
  end

  assign head = q[0];

  initial assert (DIM % EPB == 0) else $error("DIM must be a multiple of EPB");
endmodule
