// knn_vec_bank: one double-buffered BRAM bank of the KNN rerank kernel.
//
// The database vectors of a batch are interleaved over the banks, one vector
// per bank, so every PE reads its own element each cycle. Each bank has two
// buffers: the memory interface fills one while the PEs read the other
// (double buffering). Writes are whole memory beats of EPB elements
// (`wr_beat` = beat number within the vector); reads are single elements.
//
// Interleaving vectors over BRAMs and double buffering follow the design;
// the beat-wide write port and one-element read port are this
// implementation's choices.
//
// Timing: synchronous read, `rd_data` is valid one cycle after `rd_en`.
module knn_vec_bank #(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DIM    = 128,
  parameter int unsigned EPB    = 32
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic                        wr_buf,
  input  logic [$clog2(DIM/EPB)-1:0]  wr_beat,
  input  logic [EPB*ELEM_W-1:0]       wr_data,
  input  logic                        rd_en,
  input  logic                        rd_buf,
  input  logic [$clog2(DIM)-1:0]      rd_elem,
  output logic signed [ELEM_W-1:0]    rd_data
);
  localparam int unsigned BPV = DIM / EPB;          // beats per vector
  localparam int unsigned SW  = (EPB > 1) ? $clog2(EPB) : 1;

  logic [EPB*ELEM_W-1:0] mem [2*BPV];
  logic [EPB*ELEM_W-1:0] rd_beat_q;
  logic [SW-1:0]         rd_sel_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_buf, wr_beat}] <= wr_data;
    if (rd_en) begin
      rd_beat_q <= mem[{rd_buf, rd_elem[$clog2(DIM)-1 -: $clog2(BPV)]}];
      rd_sel_q  <= SW'(rd_elem % EPB);
    end
  end

  assign rd_data = rd_beat_q[rd_sel_q*ELEM_W +: ELEM_W];
endmodule
