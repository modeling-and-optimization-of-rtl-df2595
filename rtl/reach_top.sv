// reach_top: ReACH, a reconfigurable accelerator compute hierarchy with
// accelerators at every level of the memory hierarchy.
//
// Contents:
//  * gam              - global accelerator manager: takes task packets from
//                       the cores, queues them per accelerator, launches them,
//                       polls for completion, forwards outputs by DMA request
//                       and interrupts the core when a thread's job is done.
//  * gam_level_bridge - the paths from the GAM to each level: direct to the
//                       on-chip accelerator, configuration-window accesses
//                       through the memory channel to near-memory modules,
//                       vendor NVMe commands over PCIe to near-storage ones.
//  * mc_interleave x2 - address mapping registers of the two memory
//                       controllers: MC0 serves the CPU / on-chip DIMMs
//                       (cache-line interleave), MC1 the near-memory DIMMs
//                       (tile mode once the GAM has set it).
//  * aim_module x N_NM and aimbus - near-memory accelerators, one per DIMM,
//                       connected by the inter-DIMM AIMbus.
//  * ns_accel x N_NS  - near-storage accelerators, one per SSD, each running
//                       a KNN rerank kernel (128 dimensions, 128 PEs).
// Accelerator ids: 0 on-chip, 1..N_NM near-memory, N_NM+1.. near-storage.
//
// Parts that are not built here come out as ports: the on-chip accelerator
// (its command/status packets), the programmable fabric of each AIM module,
// the DIMMs (request/response with a precharge-all strobe), the SSDs (NVMe
// commands/completions), the host's own memory and disk traffic, and the
// DMA requests of the GAM (served by the host's DMA engines).
//
// The levels, their counts (one on-chip, four near-memory, four near-storage
// accelerators) and the GAM-centred control follow the design; the port
// formats are this implementation's. Host memory reads to different DIMMs
// may return out of order; `hm_rdimm` tells which DIMM answered.
//
// Lint note: verilator reports circular logic (UNOPTFLAT) on the arrays
// b_req_i_r, mn_ready and ns_ready. Each array is treated as one signal, so
// the ready of one element depending on the valid of another element looks
// like a loop. Per element there is no combinational cycle: every ready
// depends only on the far side's state and on valids that do not look at it.
module reach_top
  import reach_pkg::*;
#(
  parameter int unsigned N_NM   = 4,
  parameter int unsigned N_NS   = 4,
  parameter int unsigned DIM    = 128,
  parameter int unsigned N_PE   = 128,
  parameter int unsigned K      = 10,
  parameter logic [MEM_AW-1:0] CFG_BASE = 32'hFFFF_FF00
) (
  input  logic              clk,
  input  logic              rst_n,
  // cores: job requests, runtime configuration, interrupt
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  acc_cmd_t          cmd,
  input  logic              cfg_valid,
  input  gam_cfg_t          cfg,
  output logic              irq_valid,
  output gam_irq_t          irq,
  output logic [N_NM+N_NS:0] acc_free,
  // GAM DMA requests
  output logic              dma_valid,
  input  logic              dma_ready,
  output dma_req_t          dma,
  output logic              dma_tlb_miss,
  // on-chip accelerator
  output logic              oc_cmd_valid,
  input  logic              oc_cmd_ready,
  output acc_cmd_t          oc_cmd,
  output logic              oc_streq_valid,
  input  logic              oc_streq_ready,
  input  logic              oc_stat_valid,
  input  acc_status_t       oc_stat,
  // MC0: CPU-side address mapping
  input  logic [ADDR_W-1:0] cpu_addr,
  output logic [1:0]        cpu_dimm,
  output logic [MEM_AW-1:0] cpu_dimm_addr,
  output logic              cpu_tile_mode,
  // host memory traffic to the near-memory channel (MC1)
  input  logic              hm_valid,
  output logic              hm_ready,
  input  logic              hm_we,
  input  logic [ADDR_W-1:0] hm_addr,
  input  logic [MEM_DW-1:0] hm_wdata,
  output logic              hm_rvalid,
  output logic [$clog2(N_NM)-1:0] hm_rdimm,
  output logic [MEM_DW-1:0] hm_rdata,
  output logic              nm_tile_mode,
  // near-memory DIMMs
  output logic              dimm_valid   [N_NM],
  input  logic              dimm_ready   [N_NM],
  output mem_req_t          dimm_req     [N_NM],
  input  logic              dimm_rvalid  [N_NM],
  input  logic [MEM_DW-1:0] dimm_rdata   [N_NM],
  output logic              dimm_pre_all [N_NM],
  // AIM programmable fabrics
  output logic              fab_start      [N_NM],
  output logic [MEM_DW-1:0] fab_task       [N_NM],
  output logic [MEM_DW-1:0] fab_args       [N_NM][8],
  input  logic              fab_mem_valid  [N_NM],
  output logic              fab_mem_ready  [N_NM],
  input  mem_req_t          fab_mem_req    [N_NM],
  input  logic              fab_mem_remote [N_NM],
  input  logic [NODE_W-1:0] fab_mem_node   [N_NM],
  output logic              fab_mem_rvalid [N_NM],
  output logic [MEM_DW-1:0] fab_mem_rdata  [N_NM],
  input  logic              fab_done       [N_NM],
  input  logic [MEM_AW-1:0] fab_tail       [N_NM],
  output logic              nm_owns_dimm   [N_NM],
  // host disk traffic and SSDs
  input  logic              h_ns_valid  [N_NS],
  output logic              h_ns_ready  [N_NS],
  input  nvme_cmd_t         h_ns_cmd    [N_NS],
  output logic              h_ns_cvalid [N_NS],
  output nvme_cpl_t         h_ns_cpl    [N_NS],
  output logic              ssd_valid   [N_NS],
  input  logic              ssd_ready   [N_NS],
  output nvme_cmd_t         ssd_cmd     [N_NS],
  input  logic              ssd_cvalid  [N_NS],
  input  nvme_cpl_t         ssd_cpl     [N_NS],
  output logic              ns_busy     [N_NS]
);
  localparam int unsigned N_ACC = 1 + N_NM + N_NS;
  localparam int unsigned NMI_W = $clog2(N_NM);

  // ------------------------------------------------------------- GAM ----
  logic             launch_valid, launch_ready, streq_valid, streq_ready, stat_valid, stat_ready;
  acc_cmd_t         launch;
  logic [ACC_W-1:0] streq_acc;
  acc_status_t      stat;
  logic             mc_cfg_valid, mc_cfg_tile_mode;
  logic [ACC_W-1:0] mc_cfg_idx;
  logic [4:0]       mc_cfg_tile_log2;

  gam #(.N_ACC(N_ACC)) u_gam (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cfg_valid, .cfg,
    .launch_valid, .launch_ready, .launch,
    .streq_valid, .streq_ready, .streq_acc,
    .stat_valid, .stat_ready, .stat,
    .dma_valid, .dma_ready, .dma, .dma_tlb_miss,
    .irq_valid, .irq,
    .mc_cfg_valid, .mc_cfg_idx, .mc_cfg_tile_mode, .mc_cfg_tile_log2,
    .acc_free
  );

  // ------------------------------------------------ memory controllers --
  logic [NMI_W-1:0]  hm_dimm;
  logic [MEM_AW-1:0] hm_dimm_addr;

  mc_interleave #(.N_DIMM(4)) u_mc0 (
    .clk, .rst_n, .cfg_valid(mc_cfg_valid && mc_cfg_idx == '0),
    .cfg_tile_mode(mc_cfg_tile_mode), .cfg_tile_log2(mc_cfg_tile_log2),
    .addr(cpu_addr), .dimm(cpu_dimm), .dimm_addr(cpu_dimm_addr), .tile_mode(cpu_tile_mode)
  );

  mc_interleave #(.N_DIMM(N_NM)) u_mc1 (
    .clk, .rst_n, .cfg_valid(mc_cfg_valid && mc_cfg_idx == ACC_W'(1)),
    .cfg_tile_mode(mc_cfg_tile_mode), .cfg_tile_log2(mc_cfg_tile_log2),
    .addr(hm_addr), .dimm(hm_dimm), .dimm_addr(hm_dimm_addr), .tile_mode(nm_tile_mode)
  );

  // ---------------------------------------------------------- bridge ----
  logic              h_mn_valid [N_NM], h_mn_ready [N_NM], h_mn_rvalid [N_NM];
  mem_req_t          h_mn_req   [N_NM];
  logic [MEM_DW-1:0] h_mn_rdata [N_NM];
  logic              mn_valid [N_NM], mn_ready [N_NM], mn_rvalid [N_NM];
  mem_req_t          mn_req   [N_NM];
  logic [MEM_DW-1:0] mn_rdata [N_NM];
  logic              ns_valid [N_NS], ns_ready [N_NS], ns_cvalid [N_NS];
  nvme_cmd_t         ns_cmd   [N_NS];
  nvme_cpl_t         ns_cpl   [N_NS];

  always_comb begin
    hm_ready  = 1'b0;
    hm_rvalid = 1'b0;
    hm_rdimm  = '0;
    hm_rdata  = '0;
    for (int i = 0; i < N_NM; i++) begin
      h_mn_valid[i] = hm_valid && hm_dimm == NMI_W'(i);
      h_mn_req[i]   = '{we: hm_we, addr: hm_dimm_addr, wdata: hm_wdata};
      if (hm_dimm == NMI_W'(i)) hm_ready = h_mn_ready[i];
      if (h_mn_rvalid[i]) begin hm_rvalid = 1'b1; hm_rdimm = NMI_W'(i); hm_rdata = h_mn_rdata[i]; end
    end
  end

  gam_level_bridge #(.N_NM(N_NM), .N_NS(N_NS), .K(K), .CFG_BASE(CFG_BASE)) u_bridge (
    .clk, .rst_n, .cfg_valid, .cfg,
    .launch_valid, .launch_ready, .launch,
    .streq_valid, .streq_ready, .streq_acc,
    .stat_valid, .stat_ready, .stat,
    .oc_cmd_valid, .oc_cmd_ready, .oc_cmd, .oc_streq_valid, .oc_streq_ready, .oc_stat_valid, .oc_stat,
    .h_mn_valid, .h_mn_ready, .h_mn_req, .h_mn_rvalid, .h_mn_rdata,
    .mn_valid, .mn_ready, .mn_req, .mn_rvalid, .mn_rdata,
    .h_ns_valid, .h_ns_ready, .h_ns_cmd, .h_ns_cvalid, .h_ns_cpl,
    .ns_valid, .ns_ready, .ns_cmd, .ns_cvalid, .ns_cpl
  );

  // ----------------------------------------- near-memory level + AIMbus -
  logic         b_req_o_v [N_NM], b_req_o_r [N_NM], b_req_i_v [N_NM], b_req_i_r [N_NM];
  aimbus_req_t  b_req_o   [N_NM], b_req_i   [N_NM];
  logic         b_rsp_o_v [N_NM], b_rsp_o_r [N_NM], b_rsp_i_v [N_NM], b_rsp_i_r [N_NM];
  aimbus_resp_t b_rsp_o   [N_NM], b_rsp_i   [N_NM];

  for (genvar i = 0; i < N_NM; i++) begin : g_nm
    aim_module #(.NODE_ID(NODE_W'(i)), .CFG_BASE(CFG_BASE)) u_aim (
      .clk, .rst_n,
      .mn_valid(mn_valid[i]), .mn_ready(mn_ready[i]), .mn_req(mn_req[i]),
      .mn_rvalid(mn_rvalid[i]), .mn_rdata(mn_rdata[i]),
      .dimm_valid(dimm_valid[i]), .dimm_ready(dimm_ready[i]), .dimm_req(dimm_req[i]),
      .dimm_rvalid(dimm_rvalid[i]), .dimm_rdata(dimm_rdata[i]), .dimm_pre_all(dimm_pre_all[i]),
      .bus_req_out_valid(b_req_o_v[i]), .bus_req_out_ready(b_req_o_r[i]), .bus_req_out(b_req_o[i]),
      .bus_req_in_valid(b_req_i_v[i]), .bus_req_in_ready(b_req_i_r[i]), .bus_req_in(b_req_i[i]),
      .bus_rsp_out_valid(b_rsp_o_v[i]), .bus_rsp_out_ready(b_rsp_o_r[i]), .bus_rsp_out(b_rsp_o[i]),
      .bus_rsp_in_valid(b_rsp_i_v[i]), .bus_rsp_in_ready(b_rsp_i_r[i]), .bus_rsp_in(b_rsp_i[i]),
      .fab_start(fab_start[i]), .fab_task(fab_task[i]), .fab_args(fab_args[i]),
      .fab_mem_valid(fab_mem_valid[i]), .fab_mem_ready(fab_mem_ready[i]), .fab_mem_req(fab_mem_req[i]),
      .fab_mem_remote(fab_mem_remote[i]), .fab_mem_node(fab_mem_node[i]),
      .fab_mem_rvalid(fab_mem_rvalid[i]), .fab_mem_rdata(fab_mem_rdata[i]),
      .fab_done(fab_done[i]), .fab_tail(fab_tail[i]), .acc_owns_dimm(nm_owns_dimm[i])
    );
  end

  aimbus #(.N(N_NM)) u_aimbus (
    .clk, .rst_n,
    .req_in_valid(b_req_o_v), .req_in_ready(b_req_o_r), .req_in(b_req_o),
    .req_out_valid(b_req_i_v), .req_out_ready(b_req_i_r), .req_out(b_req_i),
    .rsp_in_valid(b_rsp_o_v), .rsp_in_ready(b_rsp_o_r), .rsp_in(b_rsp_o),
    .rsp_out_valid(b_rsp_i_v), .rsp_out_ready(b_rsp_i_r), .rsp_out(b_rsp_i)
  );

  // ----------------------------------------------- near-storage level ---
  for (genvar j = 0; j < N_NS; j++) begin : g_ns
    ns_accel #(.DIM(DIM), .N_PE(N_PE), .K(K)) u_ns (
      .clk, .rst_n,
      .host_valid(ns_valid[j]), .host_ready(ns_ready[j]), .host_cmd(ns_cmd[j]),
      .host_cvalid(ns_cvalid[j]), .host_cpl(ns_cpl[j]),
      .ssd_valid(ssd_valid[j]), .ssd_ready(ssd_ready[j]), .ssd_cmd(ssd_cmd[j]),
      .ssd_cvalid(ssd_cvalid[j]), .ssd_cpl(ssd_cpl[j]),
      .kernel_busy(ns_busy[j])
    );
  end
endmodule
