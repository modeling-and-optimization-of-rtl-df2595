// mc_interleave: address-mapping registers of one memory controller.
//
// Decides which DIMM of the controller holds a physical address and where in
// that DIMM. Two modes, selected by a register the GAM writes:
//   cache mode: consecutive 64-byte lines rotate over the DIMMs, which gives
//               the CPU and the on-chip accelerator the combined bandwidth of
//               all DIMMs;
//   tile mode:  consecutive tiles of 2^tile_log2 bytes rotate over the DIMMs,
//               so a whole tile sits in one DIMM where its near-memory
//               accelerator can work on it alone.
// In both modes: dimm = (addr / G) mod N_DIMM and
// dimm_addr = (addr / (G * N_DIMM)) * G + addr mod G, with G the granule.
//
// Cache-line interleaving for the CPU side and tile granularity for the
// near-memory side, set through the controller's registers, follow the
// design; the register format and the formula are this implementation's.
// N_DIMM must be a power of two. Combinational mapping; a register write
// takes effect the next cycle. Reset selects cache mode.
module mc_interleave
  import reach_pkg::*;
#(
  parameter int unsigned N_DIMM    = 4,
  parameter int unsigned LINE_LOG2 = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_valid,
  input  logic                      cfg_tile_mode,
  input  logic [4:0]                cfg_tile_log2,
  input  logic [ADDR_W-1:0]         addr,
  output logic [$clog2(N_DIMM)-1:0] dimm,
  output logic [MEM_AW-1:0]         dimm_addr,
  output logic                      tile_mode
);
  localparam int unsigned DW = $clog2(N_DIMM);
  logic [4:0] tile_log2;
  logic [4:0] g;               // log2 of the granule

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tile_mode <= 1'b0; tile_log2 <= 5'(LINE_LOG2);
    end else if (cfg_valid) begin
      tile_mode <= cfg_tile_mode;
      tile_log2 <= (cfg_tile_log2 < 5'(LINE_LOG2)) ? 5'(LINE_LOG2) : cfg_tile_log2;
    end
  end

  always_comb begin
    logic [ADDR_W-1:0] gran, upper, low;
    g         = tile_mode ? tile_log2 : 5'(LINE_LOG2);
    gran      = addr >> g;
    dimm      = DW'(gran);
    upper     = (gran >> DW) << g;
    low       = addr & ((ADDR_W'(1) << g) - 1'b1);
    dimm_addr = MEM_AW'(upper | low);
  end
endmodule
