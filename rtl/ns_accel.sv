// ns_accel: near-storage accelerator, one per SSD, running the KNN rerank
// kernel next to the data.
//
// Sits on the local PCIe link between the host and one SSD. Commands from the
// host interface pass the access filter: ordinary disk I/O goes through the
// pass-through logic to the SSD unchanged; accelerator commands (vendor
// opcodes) drive the control logic:
//   ACC_WR_QUERY  data = one 512-bit beat of the query vector
//   ACC_RUN       lba = first beat of the database on the SSD,
//                 len = number of vectors; starts the DMA and the kernel
//   ACC_STATUS    completion data[31:0] = {finished, busy, 14'b0, K}
//   ACC_RESULT    lba = rank r; completion data = {index[31:0], distance}
// Every accelerator command is answered with one completion carrying its tag
// (status 0, or 1 for a rejected command such as ACC_RUN while busy). The DMA
// streams the database from the SSD through the pass-through logic into the
// kernel; when the kernel ends, the top-K list is copied into the scratchpad
// (SPM), where ACC_RESULT reads it. Only the query goes in and K results come
// out, so the data reduction happens next to the disk.
//
// From the design: host interface, access filter separating accelerator
// commands from disk access, pass-through logic, DMA, SPM, the FPGA-SSD
// interface and a KNN kernel as the rerank accelerator. This
// implementation's choices: the command set and encodings above, and that
// host-bound SSD completions have priority over accelerator completions,
// which wait in a small queue. The private DRAM buffer of the design is not
// modelled (the KNN kernel reuses no data).
module ns_accel
  import reach_pkg::*;
#(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DIM    = 128,
  parameter int unsigned N_PE   = 128,
  parameter int unsigned N_SORT = 2,
  parameter int unsigned K      = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  // host interface
  input  logic      host_valid,
  output logic      host_ready,
  input  nvme_cmd_t host_cmd,
  output logic      host_cvalid,
  output nvme_cpl_t host_cpl,
  // FPGA-SSD interface
  output logic      ssd_valid,
  input  logic      ssd_ready,
  output nvme_cmd_t ssd_cmd,
  input  logic      ssd_cvalid,
  input  nvme_cpl_t ssd_cpl,
  // status
  output logic      kernel_busy
);
  localparam int unsigned IDX_W  = 32;
  localparam int unsigned DIST_W = 2*ELEM_W + 1 + $clog2(DIM);
  localparam int unsigned BPV    = DIM / (NVME_DW / ELEM_W);

  // ---------------------------------------------------- access filter ----
  logic      acc_valid, acc_ready, io_valid, io_ready;
  nvme_cmd_t fcmd;

  ns_access_filter u_filter (
    .host_valid, .host_ready, .host_cmd,
    .acc_valid, .acc_ready, .io_valid, .io_ready, .cmd(fcmd)
  );

  // --------------------------------------------- pass-through and DMA ----
  logic      dma_cmd_valid, dma_cmd_ready, dma_cvalid, pt_host_cvalid, dma_busy;
  nvme_cmd_t dma_cmd;
  nvme_cpl_t pt_cpl;
  logic      db_valid, db_ready;
  logic [NVME_DW-1:0] db_data;
  logic      run_start;
  logic [LBA_W-1:0] run_lba, run_vecs;

  ns_passthrough u_pt (
    .io_valid, .io_ready, .io_cmd(fcmd),
    .dma_valid(dma_cmd_valid), .dma_ready(dma_cmd_ready), .dma_cmd,
    .ssd_valid, .ssd_ready, .ssd_cmd,
    .ssd_cvalid, .ssd_cpl,
    .host_cvalid(pt_host_cvalid), .dma_cvalid, .cpl(pt_cpl)
  );

  ns_dma u_dma (
    .clk, .rst_n,
    .start(run_start), .lba(run_lba), .nbeats(run_vecs * BPV), .busy(dma_busy),
    .cmd_valid(dma_cmd_valid), .cmd_ready(dma_cmd_ready), .cmd(dma_cmd),
    .cpl_valid(dma_cvalid), .cpl(pt_cpl),
    .out_valid(db_valid), .out_ready(db_ready), .out_data(db_data)
  );

  // --------------------------------------------------------- kernel -----
  logic              k_busy, k_done;
  logic [DIST_W-1:0] res_dist [K];
  logic [IDX_W-1:0]  res_idx  [K];
  logic              res_vld  [K];
  logic              q_wr;

  knn_kernel #(.ELEM_W(ELEM_W), .DIM(DIM), .N_PE(N_PE), .N_SORT(N_SORT), .K(K),
               .BUS_W(NVME_DW), .IDX_W(IDX_W)) u_knn (
    .clk, .rst_n,
    .q_wr_valid(q_wr), .q_wr_data(fcmd.data),
    .start(run_start), .num_vec(run_vecs), .busy(k_busy), .done(k_done),
    .db_valid, .db_ready, .db_data,
    .res_dist, .res_idx, .res_vld
  );

  // ------------------------------------------------------------ SPM -----
  logic [DIST_W-1:0] spm_dist [K];
  logic [IDX_W-1:0]  spm_idx  [K];
  logic              finished;

  // ------------------------------------------------- control logic ------
  nvme_cpl_t cq_din, cq_head;
  logic      cq_empty, cq_full, acc_fire, busy_any;

  assign busy_any  = k_busy || dma_busy;
  assign acc_ready = !cq_full;
  assign acc_fire  = acc_valid && acc_ready;
  assign q_wr      = acc_fire && fcmd.opcode == ACC_WR_QUERY && !busy_any;
  assign run_start = acc_fire && fcmd.opcode == ACC_RUN && !busy_any;
  assign run_lba   = fcmd.lba;
  assign run_vecs  = LBA_W'(fcmd.len);

  always_comb begin
    cq_din        = '0;
    cq_din.tag    = fcmd.tag;
    cq_din.status = 8'd0;
    case (fcmd.opcode)
      ACC_WR_QUERY, ACC_RUN: cq_din.status = busy_any ? 8'd1 : 8'd0;
      ACC_STATUS: cq_din.data[31:0] = {finished, busy_any, 14'b0, 16'(K)};
      ACC_RESULT:
        if (fcmd.lba < LBA_W'(K))
          cq_din.data[IDX_W+DIST_W-1:0] = {spm_idx[fcmd.lba[$clog2(K)-1:0]], spm_dist[fcmd.lba[$clog2(K)-1:0]]};
        else cq_din.status = 8'd1;
      default: cq_din.status = 8'd1;
    endcase
  end

  reach_fifo #(.T(nvme_cpl_t), .DEPTH(4)) u_cq (
    .clk, .rst_n, .push(acc_fire), .din(cq_din),
    .pop(!pt_host_cvalid && !cq_empty), .head(cq_head), .empty(cq_empty), .full(cq_full)
  );

  assign host_cvalid = pt_host_cvalid || !cq_empty;
  assign host_cpl    = pt_host_cvalid ? pt_cpl : cq_head;
  assign kernel_busy = busy_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      finished <= 1'b0;
      for (int i = 0; i < K; i++) begin spm_dist[i] <= '1; spm_idx[i] <= '0; end
    end else begin
      if (run_start) finished <= 1'b0;
      if (k_done) begin
        finished <= 1'b1;
        for (int i = 0; i < K; i++) begin
          spm_dist[i] <= res_vld[i] ? res_dist[i] : '1;
          spm_idx[i]  <= res_idx[i];
        end
      end
    end
  end
endmodule
