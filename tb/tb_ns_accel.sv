// tb_ns_accel: one near-storage accelerator (reduced KNN kernel: 64
// dimensions, 8 PEs, K = 4) between a host model and an SSD model that
// returns a known beat for every LBA after a random delay. Checks: ordinary
// NVMe reads pass through with their data; the query is written with
// vendor commands; ACC_RUN streams the database from the SSD by DMA (tag
// bit 7) while host reads still pass; a second ACC_RUN while busy is
// rejected; ACC_STATUS reports busy then finished; ACC_RESULT returns the
// K nearest vectors of a reference computed here; a rank past K is an error.
module tb_ns_accel;
  import reach_pkg::*;
  localparam int DIM = 64, N_PE = 8, K = 4, EPB = 32, BPV = DIM / EPB, NV = 37, LBA0 = 50;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, host_cvalid; nvme_cmd_t host_cmd = '0; nvme_cpl_t host_cpl;
  logic ssd_valid, ssd_ready, ssd_cvalid = 0; nvme_cmd_t ssd_cmd; nvme_cpl_t ssd_cpl = '0;
  logic kernel_busy;
  int checks = 0, failures = 0, n_dma = 0;
  ns_accel #(.DIM(DIM), .N_PE(N_PE), .K(K)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (40000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  function automatic logic signed [15:0] el(int lba, int e); return 16'(((lba * 53 + e * 29) % 257) - 128); endfunction
  function automatic logic signed [15:0] qe(int d); return 16'(((d * 13) % 71) - 35); endfunction
  function automatic logic [NVME_DW-1:0] beat(int lba);
    logic [NVME_DW-1:0] b; for (int e = 0; e < EPB; e++) b[e*16 +: 16] = el(lba, e); return b;
  endfunction
  // SSD: in order, random delay, random ready
  nvme_cpl_t cq [$]; int cl [$];
  always @(negedge clk) ssd_ready = ($urandom % 3) != 0;
  always @(posedge clk) begin
    ssd_cvalid <= 0;
    if (cl.size() > 0 && cl[0] <= 0) begin ssd_cvalid <= 1; ssd_cpl <= cq.pop_front(); void'(cl.pop_front()); end
    foreach (cl[i]) cl[i]--;
    if (ssd_valid && ssd_ready) begin
      if (ssd_cmd.tag[7]) n_dma++;
      cq.push_back('{tag: ssd_cmd.tag, status: 0, data: beat(int'(ssd_cmd.lba))}); cl.push_back(int'($urandom % 5));
    end
  end
  task automatic nvme(logic [7:0] op, logic [7:0] tag, int lba, int len, logic [NVME_DW-1:0] d, output nvme_cpl_t c);
    @(negedge clk); host_valid = 1; host_cmd = '{opcode: op, tag: tag, lba: LBA_W'(lba), len: 16'(len), data: d};
    @(posedge clk iff host_ready); @(negedge clk); host_valid = 0;
    @(posedge clk iff (host_cvalid && host_cpl.tag == tag)); c = host_cpl;
  endtask
  nvme_cpl_t c; longint rd [NV]; longint srt [$]; int polls;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    nvme(NVME_READ, 8'h01, 9, 1, '0, c); chk(c.data == beat(9), "pass-through read");
    for (int b = 0; b < BPV; b++) begin
      logic [NVME_DW-1:0] q; for (int e = 0; e < EPB; e++) q[e*16 +: 16] = qe(b * EPB + e);
      nvme(ACC_WR_QUERY, 8'h02, 0, 0, q, c); chk(c.status == 0, "query beat");
    end
    nvme(ACC_RUN, 8'h03, LBA0, NV, '0, c); chk(c.status == 0, "run accepted");
    nvme(ACC_RUN, 8'h04, LBA0, NV, '0, c); chk(c.status == 1, "second run while busy rejected");
    nvme(ACC_STATUS, 8'h05, 0, 0, '0, c); chk(c.data[30] && !c.data[31], "status busy");
    nvme(NVME_READ, 8'h06, 77, 1, '0, c); chk(c.data == beat(77), "pass-through during the kernel");
    polls = 0;
    do begin nvme(ACC_STATUS, 8'h05, 0, 0, '0, c); polls++; end while (!c.data[31] && polls < 2000);
    chk(c.data[31] && !c.data[30] && c.data[15:0] == 16'(K), "status finished with K results");
    chk(n_dma == NV * BPV, $sformatf("DMA read %0d beats", n_dma));
    for (int v = 0; v < NV; v++) begin
      rd[v] = 0;
      for (int d = 0; d < DIM; d++) begin
        automatic longint df = longint'(el(LBA0 + v * BPV + d / EPB, d % EPB)) - longint'(qe(d));
        rd[v] += df * df;
      end
      srt.push_back(rd[v]);
    end
    srt.sort();
    for (int r = 0; r < K; r++) begin
      automatic longint dd; automatic int ix;
      nvme(ACC_RESULT, 8'h10 + 8'(r), r, 0, '0, c);
      dd = longint'(c.data[38:0]); ix = int'(c.data[70:39]);
      chk(c.status == 0 && dd == srt[r] && ix < NV && rd[ix] == dd, $sformatf("rank %0d: %0d idx %0d, expected %0d", r, dd, ix, srt[r]));
    end
    nvme(ACC_RESULT, 8'h20, K, 0, '0, c); chk(c.status == 1, "rank past K rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
