// tb_reach_top: end-to-end test of the ReACH hierarchy at its default size
// (four near-memory modules, four near-storage accelerators with the full
// 128-dimension, 128-PE KNN kernel).
//
// The testbench plays the host runtime (GAM configuration, job submission,
// host memory and disk traffic), the DIMMs, the AIM programmable fabrics,
// the SSDs, the host DMA engine and the on-chip accelerator. Scenario:
//   1. host memory writes/reads under cache-line interleave, then the GAM
//      switches the near-memory controller to tile mode and they repeat;
//   2. plain NVMe read/write pass through a near-storage accelerator;
//   3. the query vector goes into NS0 with vendor commands;
//   4. jobs: NM0 task -> (DMA of its output) -> NS0 KNN task (thread 1),
//      an on-chip task (thread 2), an NM1 task whose fabric reads a word of
//      NM2's DIMM over the AIMbus (thread 3), and a burst of on-chip tasks
//      that fills the queues (thread 4);
//   5. the host reads the K results from NS0 and compares them with a
//      reference KNN computed here.
// Each mechanism is counted; one that never happens is a failure.
module tb_reach_top;
  import reach_pkg::*;
  localparam int N_NM = 4, N_NS = 4, DIM = 128, K = 10, EPB = 32, BPV = DIM / EPB;
  localparam int NV = 24;            // database vectors of the NS task
  localparam int DB_LBA = 100;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready; acc_cmd_t cmd = '0;
  logic cfg_valid = 0; gam_cfg_t cfg = '0;
  logic irq_valid; gam_irq_t irq;
  logic [N_NM+N_NS:0] acc_free;
  logic dma_valid, dma_ready = 1; dma_req_t dma; logic dma_tlb_miss;
  logic oc_cmd_valid, oc_cmd_ready = 1; acc_cmd_t oc_cmd;
  logic oc_streq_valid, oc_streq_ready = 1;
  logic oc_stat_valid = 0; acc_status_t oc_stat = '0;
  logic [ADDR_W-1:0] cpu_addr = '0; logic [1:0] cpu_dimm; logic [MEM_AW-1:0] cpu_dimm_addr; logic cpu_tile_mode;
  logic hm_valid = 0, hm_ready, hm_we = 0; logic [ADDR_W-1:0] hm_addr = '0; logic [MEM_DW-1:0] hm_wdata = '0;
  logic hm_rvalid; logic [1:0] hm_rdimm; logic [MEM_DW-1:0] hm_rdata; logic nm_tile_mode;
  logic dimm_valid [N_NM], dimm_ready [N_NM], dimm_rvalid [N_NM], dimm_pre_all [N_NM];
  mem_req_t dimm_req [N_NM]; logic [MEM_DW-1:0] dimm_rdata [N_NM];
  logic fab_start [N_NM]; logic [MEM_DW-1:0] fab_task [N_NM]; logic [MEM_DW-1:0] fab_args [N_NM][8];
  logic fab_mem_valid [N_NM], fab_mem_ready [N_NM], fab_mem_remote [N_NM], fab_mem_rvalid [N_NM];
  mem_req_t fab_mem_req [N_NM]; logic [NODE_W-1:0] fab_mem_node [N_NM]; logic [MEM_DW-1:0] fab_mem_rdata [N_NM];
  logic fab_done [N_NM]; logic [MEM_AW-1:0] fab_tail [N_NM]; logic nm_owns_dimm [N_NM];
  logic h_ns_valid [N_NS], h_ns_ready [N_NS], h_ns_cvalid [N_NS]; nvme_cmd_t h_ns_cmd [N_NS]; nvme_cpl_t h_ns_cpl [N_NS];
  logic ssd_valid [N_NS], ssd_ready [N_NS], ssd_cvalid [N_NS]; nvme_cmd_t ssd_cmd [N_NS]; nvme_cpl_t ssd_cpl [N_NS];
  logic ns_busy [N_NS];

  reach_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------ data models ----
  function automatic logic signed [15:0] db_elem(int lba, int e);
    return 16'(((lba * 37 + e * 11 + (lba / 3) * 5) % 201) - 100);
  endfunction
  function automatic logic signed [15:0] q_elem(int d);
    return 16'(((d * 7) % 61) - 30);
  endfunction
  function automatic logic [NVME_DW-1:0] beat(int lba);
    logic [NVME_DW-1:0] b;
    for (int e = 0; e < EPB; e++) b[e*16 +: 16] = db_elem(lba, e);
    return b;
  endfunction
  function automatic longint ref_dist(int v);
    longint s = 0;
    for (int d = 0; d < DIM; d++) begin
      automatic longint df = longint'(db_elem(DB_LBA + v * BPV + d / EPB, d % EPB)) - longint'(q_elem(d));
      s += df * df;
    end
    return s;
  endfunction

  // ------------------------------------------------------ counters -------
  int n_backpressure = 0, n_dma = 0, n_retry = 0, n_precharge = 0, n_tile_switch = 0;
  int n_passthru = 0, n_remote = 0, n_irq = 0, n_oc_launch = 0, n_knn_done = 0, n_nm_launch = 0;
  int n_interleave = 0;
  bit irq_seen [16];
  dma_req_t dma_seen;
  logic prev_tile = 0;
  logic prev_busy [N_NS] = '{default: 1'b0};
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && !cmd_ready) n_backpressure++;
    if (dma_valid && dma_ready) begin n_dma++; dma_seen = dma; end
    if (dut.stat_valid && dut.stat_ready && !dut.stat.finished) n_retry++;
    if (irq_valid) begin n_irq++; irq_seen[irq.thread] = 1; end
    if (oc_cmd_valid && oc_cmd_ready) n_oc_launch++;
    if (nm_tile_mode && !prev_tile) n_tile_switch++;
    prev_tile <= nm_tile_mode;
    for (int i = 0; i < N_NM; i++) begin
      if (dimm_pre_all[i]) n_precharge++;
      if (fab_start[i]) n_nm_launch++;
    end
    for (int j = 0; j < N_NS; j++) begin
      if (prev_busy[j] && !ns_busy[j]) n_knn_done++;
      prev_busy[j] <= ns_busy[j];
    end
    if (dut.b_req_i_v[2] && dut.b_req_i_r[2]) n_remote++;
  end

  // ------------------------------------------------------ DIMM models ----
  logic [MEM_DW-1:0] dmem [N_NM][logic [MEM_AW-1:0]];
  int dimm_hits [N_NM];
  for (genvar i = 0; i < N_NM; i++) begin : g_dimm
    logic [MEM_DW-1:0] rq [$];
    assign dimm_ready[i] = 1'b1;
    always @(posedge clk) begin
      dimm_rvalid[i] <= 1'b0;
      if (rq.size() > 0) begin dimm_rvalid[i] <= 1'b1; dimm_rdata[i] <= rq.pop_front(); end
      if (dimm_valid[i] && dimm_ready[i]) begin
        dimm_hits[i]++;
        if (dimm_req[i].we) dmem[i][dimm_req[i].addr] = dimm_req[i].wdata;
        else rq.push_back(dmem[i].exists(dimm_req[i].addr) ? dmem[i][dimm_req[i].addr]
                                                              : {32'(i), dimm_req[i].addr});
      end
    end
  end

  // ------------------------------------------------------ fabric models --
  for (genvar i = 0; i < N_NM; i++) begin : g_fab
    initial begin
      fab_mem_valid[i] = 0; fab_mem_remote[i] = 0; fab_mem_node[i] = '0; fab_mem_req[i] = '0;
      fab_done[i] = 0; fab_tail[i] = '0;
      forever begin
        @(posedge clk iff fab_start[i]);
        // one local read of the input buffer, NM1 also one remote read of NM2
        for (int r = 0; r < ((i == 1) ? 2 : 1); r++) begin
          @(negedge clk);
          fab_mem_valid[i] = 1; fab_mem_remote[i] = (r == 1); fab_mem_node[i] = NODE_W'(2);
          fab_mem_req[i] = '{we: 1'b0, addr: MEM_AW'(fab_args[i][1]) + MEM_AW'(r * 8), wdata: '0};
          @(posedge clk iff fab_mem_ready[i]);
          @(negedge clk); fab_mem_valid[i] = 0;
          @(posedge clk iff fab_mem_rvalid[i]);
          if (r == 1) check(fab_mem_rdata[i] == {32'd2, MEM_AW'(fab_args[i][1]) + 32'd8},
                            "AIMbus remote read returns NM2's DIMM word");
          else check(fab_mem_rdata[i] == {32'(i), MEM_AW'(fab_args[i][1])}, "fabric local read");
        end
        repeat (60) @(posedge clk);
        @(negedge clk); fab_done[i] = 1; fab_tail[i] = MEM_AW'(fab_args[i][3]) + 32'h40;
        @(negedge clk); fab_done[i] = 0;
      end
    end
  end

  // ------------------------------------------------------ SSD models -----
  for (genvar j = 0; j < N_NS; j++) begin : g_ssd
    nvme_cpl_t cq [$];
    assign ssd_ready[j] = 1'b1;
    always @(posedge clk) begin
      ssd_cvalid[j] <= 1'b0;
      if (cq.size() > 0) begin ssd_cvalid[j] <= 1'b1; ssd_cpl[j] <= cq.pop_front(); end
      if (ssd_valid[j] && ssd_ready[j])
        cq.push_back('{tag: ssd_cmd[j].tag, status: 8'd0,
                       data: (ssd_cmd[j].opcode == NVME_READ) ? beat(int'(ssd_cmd[j].lba) + j) : '0});
    end
  end

  // ------------------------------------------------------ on-chip acc ----
  int oc_busy = 0;
  logic [ADDR_W-1:0] oc_out_base = 40'h5000;
  always @(posedge clk) begin
    if (oc_cmd_valid && oc_cmd_ready) oc_busy <= 30;
    else if (oc_busy > 0) oc_busy <= oc_busy - 1;
    oc_stat_valid <= 1'b0;
    if (oc_streq_valid && oc_streq_ready) begin
      oc_stat_valid <= 1'b1;
      oc_stat <= '{acc: '0, finished: (oc_busy == 0), new_wait: TIME_W'(oc_busy + 1), tail: oc_out_base + 40'h20};
    end
  end

  // ------------------------------------------------------ host tasks -----
  task automatic do_cfg(cfg_kind_e kind, int idx, logic [ADDR_W-1:0] a, logic [ADDR_W-1:0] b);
    @(negedge clk); cfg_valid = 1; cfg = '{kind: kind, idx: ACC_W'(idx), a: a, b: b};
    @(negedge clk); cfg_valid = 0;
  endtask
  task automatic submit(int acc, int thread, int tsk, int ib, int ob, bit dv, int dep);
    @(negedge clk); cmd_valid = 1;
    cmd = '{acc: ACC_W'(acc), thread: THREAD_W'(thread), task_id: TASK_W'(tsk), in_buf: BUF_W'(ib),
            out_buf: BUF_W'(ob), dep_valid: dv, dep_task: TASK_W'(dep)};
    @(posedge clk iff cmd_ready); @(negedge clk); cmd_valid = 0;
  endtask
  task automatic hm_write(logic [ADDR_W-1:0] a, logic [MEM_DW-1:0] d);
    @(negedge clk); hm_valid = 1; hm_we = 1; hm_addr = a; hm_wdata = d;
    @(posedge clk iff hm_ready); @(negedge clk); hm_valid = 0;
  endtask
  task automatic hm_read(logic [ADDR_W-1:0] a, output logic [MEM_DW-1:0] d, output int which);
    @(negedge clk); hm_valid = 1; hm_we = 0; hm_addr = a;
    @(posedge clk iff hm_ready); @(negedge clk); hm_valid = 0;
    @(posedge clk iff hm_rvalid); d = hm_rdata; which = int'(hm_rdimm);
  endtask
  task automatic nvme(int j, logic [7:0] op, logic [7:0] tag, int lba, int len,
                      logic [NVME_DW-1:0] data, output nvme_cpl_t c);
    @(negedge clk); h_ns_valid[j] = 1;
    h_ns_cmd[j] = '{opcode: op, tag: tag, lba: LBA_W'(lba), len: 16'(len), data: data};
    @(posedge clk iff h_ns_ready[j]); @(negedge clk); h_ns_valid[j] = 0;
    @(posedge clk iff (h_ns_cvalid[j] && h_ns_cpl[j].tag == tag)); c = h_ns_cpl[j];
  endtask

  logic [MEM_DW-1:0] rd; int which; nvme_cpl_t c;
  int dimm_of_line [4];
  initial begin
    for (int j = 0; j < N_NS; j++) begin h_ns_valid[j] = 0; h_ns_cmd[j] = '0; end
    repeat (5) @(posedge clk); rst_n = 1;
    // ---- runtime configuration: estimated times, buffers
    for (int a = 1; a <= N_NM; a++) do_cfg(CFG_EST_TIME, a, 40'd20, '0);   // shorter than the fabric: retried
    do_cfg(CFG_EST_TIME, 0, 40'd10, '0);
    do_cfg(CFG_EST_TIME, 5, 40'd400, '0);
    do_cfg(CFG_BUFFER, 0, 40'h1000, 40'h1400);                   // NM0 in
    do_cfg(CFG_BUFFER, 1, 40'h2000, 40'h3000);                   // NM0 out
    do_cfg(CFG_BUFFER, 2, 40'(DB_LBA), 40'(DB_LBA + NV));        // NS0 database (vectors)
    do_cfg(CFG_BUFFER, 3, 40'h10, 40'h10 + 40'(K));              // NS0 results
    do_cfg(CFG_BUFFER, 4, 40'h4000, 40'h5000);                   // on-chip in
    do_cfg(CFG_BUFFER, 5, 40'h5000, 40'h6000);                   // on-chip out
    do_cfg(CFG_BUFFER, 6, 40'h3000, 40'h3400);                   // NM1 in
    do_cfg(CFG_BUFFER, 7, 40'h7000, 40'h8000);                   // NM1 out

    // ---- 1. host memory under both interleave modes
    for (int l = 0; l < 4; l++) hm_write(40'(l * 64), 64'hA000 + 64'(l));
    for (int l = 0; l < 4; l++) begin
      hm_read(40'(l * 64), rd, which); dimm_of_line[l] = which;
      check(rd == 64'hA000 + 64'(l), "host read-back, line interleave");
    end
    check(dimm_of_line[0] != dimm_of_line[1] && dimm_of_line[1] != dimm_of_line[2]
          && dimm_of_line[2] != dimm_of_line[3], "consecutive cache lines spread over the DIMMs");
    if (dimm_of_line[0] != dimm_of_line[1]) n_interleave++;
    do_cfg(CFG_MC_MAP, 1, 40'h0C01, '0);                         // MC1: tile mode, 4 KiB tiles
    @(negedge clk);
    check(nm_tile_mode && !cpu_tile_mode, "MC1 in tile mode, MC0 untouched");
    for (int l = 0; l < 4; l++) hm_write(40'(l * 64), 64'hB000 + 64'(l));
    for (int l = 0; l < 4; l++) begin
      hm_read(40'(l * 64), rd, which);
      check(rd == 64'hB000 + 64'(l) && which == 0, "tile mode keeps one tile on one DIMM");
    end

    // ---- 2. pass-through disk traffic
    nvme(1, NVME_READ, 8'h05, 7, 1, '0, c);
    check(c.data == beat(7 + 1) && c.status == 0, "pass-through NVMe read data");
    if (c.data == beat(8)) n_passthru++;
    nvme(2, NVME_WRITE, 8'h06, 9, 1, beat(3), c);
    check(c.status == 0, "pass-through NVMe write completes");
    if (c.status == 0) n_passthru++;

    // ---- 3. query into NS0
    for (int b = 0; b < BPV; b++) begin
      logic [NVME_DW-1:0] qb;
      for (int e = 0; e < EPB; e++) qb[e*16 +: 16] = q_elem(b * EPB + e);
      nvme(0, ACC_WR_QUERY, 8'h10 + 8'(b), 0, 0, qb, c);
      check(c.status == 0, "query beat accepted");
    end

    // ---- 4. jobs
    fork
      begin
        submit(1, 1, 1, 0, 1, 0, 0);     // NM0
        submit(5, 1, 2, 2, 3, 1, 1);     // NS0, needs task 1's output
        submit(0, 2, 3, 4, 5, 0, 0);     // on-chip
        submit(2, 3, 4, 6, 7, 0, 0);     // NM1 with a remote access
        for (int t = 5; t < 21; t++) submit(0, 4, t, 4, 5, 0, 0);
      end
    join
    fork
      begin wait (irq_seen[1] && irq_seen[2] && irq_seen[3] && irq_seen[4]); end
      begin repeat (150000) @(posedge clk); end
    join_any
    disable fork;
    check(irq_seen[1] && irq_seen[2] && irq_seen[3] && irq_seen[4], "every thread interrupted");
    check(dma_seen.src == 40'h2000 && dma_seen.dst == 40'(DB_LBA) && dma_seen.len == 40'(NV),
          $sformatf("dependency DMA src=%h dst=%h len=%0d", dma_seen.src, dma_seen.dst, dma_seen.len));

    // ---- 5. results of the KNN task on NS0
    nvme(0, ACC_STATUS, 8'h20, 0, 0, '0, c);
    check(c.data[31] == 1'b1 && c.data[15:0] == 16'(K), "NS0 reports finished with K results");
    begin
      longint rdist [NV]; longint sorted_d [$];
      for (int v = 0; v < NV; v++) begin rdist[v] = ref_dist(v); sorted_d.push_back(rdist[v]); end
      sorted_d.sort();
      for (int r = 0; r < K; r++) begin
        automatic int idx;
        automatic longint d;
        nvme(0, ACC_RESULT, 8'h21 + 8'(r), r, 0, '0, c);
        d = longint'(c.data[39:0]); idx = int'(c.data[71:40]);
        check(d == sorted_d[r], $sformatf("rank %0d distance %0d, expected %0d", r, d, sorted_d[r]));
        check(idx < NV && rdist[idx] == d, $sformatf("rank %0d index %0d", r, idx));
      end
    end

    // ---- mechanism counts
    $display("mechanisms: backpressure=%0d dma=%0d status_retry=%0d precharge=%0d tile_switch=%0d interleave=%0d",
             n_backpressure, n_dma, n_retry, n_precharge, n_tile_switch, n_interleave);
    $display("            passthrough=%0d aimbus_remote=%0d irq=%0d oc_launch=%0d nm_launch=%0d knn_done=%0d",
             n_passthru, n_remote, n_irq, n_oc_launch, n_nm_launch, n_knn_done);
    check(n_backpressure > 0, "job queue back-pressure happened");
    check(n_dma > 0, "dependency DMA happened");
    check(n_retry > 0, "status retry happened");
    check(n_precharge >= 2, "precharge-all at DIMM hand-back happened");
    check(n_tile_switch > 0, "memory-controller mode switch happened");
    check(n_interleave > 0, "cache-line interleave happened");
    check(n_passthru == 2, "pass-through IO happened");
    check(n_remote > 0, "AIMbus remote access happened");
    check(n_irq >= 4, "interrupts happened");
    check(n_oc_launch == 17, "every on-chip task launched once");
    check(n_nm_launch == 2, "both near-memory tasks launched");
    check(n_knn_done == 1, "near-storage KNN kernel ran once (busy fell once)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
