// gam_buffer_table: the GAM buffer table.
//
// Maps a buffer ID to the address boundaries (base, limit) of the memory
// region allocated for an accelerator's input or output buffer. The runtime
// writes entries when it allocates buffers; the GAM reads them to build the
// DMA requests that forward a finished task's output to the input buffer of
// a dependent task. Two combinational read ports (source and destination of
// a DMA). The table with buffer ID and address boundaries follows the GAM
// micro-architecture; the entry count and the read ports are this
// implementation's choices. Entries reset to base = limit = 0.
module gam_buffer_table
  import reach_pkg::*;
#(
  parameter int unsigned N_BUF = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(N_BUF)-1:0] wr_id,
  input  logic [ADDR_W-1:0]        wr_base,
  input  logic [ADDR_W-1:0]        wr_limit,
  input  logic [$clog2(N_BUF)-1:0] rd_id_a,
  output logic [ADDR_W-1:0]        base_a,
  output logic [ADDR_W-1:0]        limit_a,
  input  logic [$clog2(N_BUF)-1:0] rd_id_b,
  output logic [ADDR_W-1:0]        base_b,
  output logic [ADDR_W-1:0]        limit_b
);
  logic [ADDR_W-1:0] base [N_BUF];
  logic [ADDR_W-1:0] limit [N_BUF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_BUF; i++) begin base[i] <= '0; limit[i] <= '0; end
    end else if (wr_en) begin
      base[wr_id]  <= wr_base;
      limit[wr_id] <= wr_limit;
    end
  end

  assign base_a  = base[rd_id_a];
  assign limit_a = limit[rd_id_a];
  assign base_b  = base[rd_id_b];
  assign limit_b = limit[rd_id_b];
endmodule
