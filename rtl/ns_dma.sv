// ns_dma: DMA engine of the near-storage accelerator.
//
// Streams a range of the local SSD into the accelerator kernel. Started with
// the first beat address and a beat count, it issues one-beat NVMe read
// commands in address order, never more than fit in its data FIFO (a credit
// scheme, so completions can always be stored), and hands the returned data
// to the kernel through a valid/ready stream in the same order. The SSD must
// complete reads in order.
//
// A DMA between the SSD interface and the kernel follows the design; the
// one-beat read granularity, credits and FIFO depth are this
// implementation's choices (a real SSD is read in pages of 4-16 KB).
module ns_dma
  import reach_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [LBA_W-1:0]   lba,
  input  logic [LBA_W-1:0]   nbeats,
  output logic               busy,
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output nvme_cmd_t          cmd,
  input  logic               cpl_valid,
  input  nvme_cpl_t          cpl,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [NVME_DW-1:0] out_data
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  logic [LBA_W-1:0] next_lba, issued, delivered, total;
  logic [CW-1:0]    inflight;          // issued, not yet popped from the FIFO
  logic             f_empty, f_full, fire_cmd, fire_out;

  assign cmd_valid = busy && (issued != total) && (inflight < CW'(FIFO_DEPTH));
  assign cmd       = '{opcode: NVME_READ, tag: {1'b1, (NVME_TAG_W-1)'(issued)},
                       lba: next_lba, len: 16'd1, data: '0};
  assign fire_cmd  = cmd_valid && cmd_ready;
  assign out_valid = !f_empty;
  assign fire_out  = out_valid && out_ready;

  reach_fifo #(.T(logic [NVME_DW-1:0]), .DEPTH(FIFO_DEPTH)) u_data (
    .clk, .rst_n, .push(cpl_valid), .din(cpl.data),
    .pop(fire_out), .head(out_data), .empty(f_empty), .full(f_full)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; next_lba <= '0; issued <= '0; delivered <= '0; total <= '0; inflight <= '0;
    end else begin
      inflight <= inflight + CW'(fire_cmd) - CW'(fire_out);
      if (start && !busy) begin
        busy <= (nbeats != '0); next_lba <= lba; issued <= '0; delivered <= '0; total <= nbeats;
      end else begin
        if (fire_cmd) begin next_lba <= next_lba + 1'b1; issued <= issued + 1'b1; end
        if (fire_out) begin
          delivered <= delivered + 1'b1;
          if (delivered + 1 == total) busy <= 1'b0;
        end
      end
    end
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(cpl_valid && f_full));
endmodule
