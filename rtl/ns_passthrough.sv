// ns_passthrough: pass-through logic of the near-storage accelerator.
//
// Lets disk I/O from the host reach the SSD with minimal overhead while the
// accelerator's DMA shares the same FPGA-SSD link. Host commands have
// priority over DMA commands. DMA commands are marked by the top bit of
// their tag, so the SSD's completions can be steered back: marked ones to the
// DMA, the others to the host interface. Host commands must use tags below
// 0x80.
//
// The pass-through role and its sharing with the DMA follow the design; the
// priority and the tag-bit steering are this implementation's choices.
// Combinational.
module ns_passthrough
  import reach_pkg::*;
(
  input  logic      io_valid,
  output logic      io_ready,
  input  nvme_cmd_t io_cmd,
  input  logic      dma_valid,
  output logic      dma_ready,
  input  nvme_cmd_t dma_cmd,
  output logic      ssd_valid,
  input  logic      ssd_ready,
  output nvme_cmd_t ssd_cmd,
  input  logic      ssd_cvalid,
  input  nvme_cpl_t ssd_cpl,
  output logic      host_cvalid,
  output logic      dma_cvalid,
  output nvme_cpl_t cpl
);
  localparam int unsigned TB = NVME_TAG_W - 1;
  always_comb begin
    ssd_valid = io_valid || dma_valid;
    ssd_cmd   = io_valid ? io_cmd : dma_cmd;
    ssd_cmd.tag[TB] = !io_valid;
    io_ready  = ssd_ready;
    dma_ready = ssd_ready && !io_valid;
  end
  assign cpl         = ssd_cpl;
  assign host_cvalid = ssd_cvalid && !ssd_cpl.tag[TB];
  assign dma_cvalid  = ssd_cvalid &&  ssd_cpl.tag[TB];
endmodule
