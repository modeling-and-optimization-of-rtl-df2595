// gam_tlb: small fully associative TLB of the GAM.
//
// Buffers are described to the GAM by virtual addresses; the TLB translates
// the source and destination addresses of the DMA requests the GAM issues.
// Entries (virtual page -> physical page) are filled by the driver; a lookup
// that matches no valid entry reports a miss and passes the address through
// unchanged. The design only names a small TLB next to the buffer table;
// the fully associative organisation, the fill port, the 4 KiB page and the
// miss behaviour are this implementation's choices.
//
// Timing: lookups are combinational; a fill takes effect the next cycle.
module gam_tlb
  import reach_pkg::*;
#(
  parameter int unsigned ENTRIES   = 8,
  parameter int unsigned PAGE_BITS = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fill,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  logic [ADDR_W-1:0]          fill_va,
  input  logic [ADDR_W-1:0]          fill_pa,
  input  logic [ADDR_W-1:0]          va_a,
  output logic [ADDR_W-1:0]          pa_a,
  output logic                       hit_a,
  input  logic [ADDR_W-1:0]          va_b,
  output logic [ADDR_W-1:0]          pa_b,
  output logic                       hit_b
);
  localparam int unsigned PN_W = ADDR_W - PAGE_BITS;
  logic            vld [ENTRIES];
  logic [PN_W-1:0] vpn [ENTRIES];
  logic [PN_W-1:0] ppn [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin vld[i] <= 1'b0; vpn[i] <= '0; ppn[i] <= '0; end
    end else if (fill) begin
      vld[fill_idx] <= 1'b1;
      vpn[fill_idx] <= fill_va[ADDR_W-1:PAGE_BITS];
      ppn[fill_idx] <= fill_pa[ADDR_W-1:PAGE_BITS];
    end
  end

  function automatic logic [ADDR_W:0] lookup(logic [ADDR_W-1:0] va);
    lookup = {1'b0, va};
    for (int i = 0; i < ENTRIES; i++)
      if (vld[i] && vpn[i] == va[ADDR_W-1:PAGE_BITS])
        lookup = {1'b1, ppn[i], va[PAGE_BITS-1:0]};
  endfunction

  always_comb begin
    {hit_a, pa_a} = lookup(va_a);
    {hit_b, pa_b} = lookup(va_b);
  end
endmodule
