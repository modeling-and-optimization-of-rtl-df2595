// tb_cbir_rerank: the rerank step of content-based image retrieval on one
// near-storage accelerator at its default size (128-dimension vectors,
// 128 PEs, 2 sort queues, K = 10). For each of two queries the host writes
// the query (96 feature elements, zero-padded to 128), starts the kernel on
// 4096 candidate vectors stored on the SSD, polls until it finishes and
// reads the 10 nearest candidates, which are compared with a reference
// computed here. The SSD model accepts a read every cycle and answers two
// cycles later, so the run is bound by the 512-bit input stream: the test
// checks that a run takes no more than 4096 x 4 beats plus 10 %.
module tb_cbir_rerank;
  import reach_pkg::*;
  localparam int DIM = 128, FEAT = 96, K = 10, EPB = 32, BPV = DIM / EPB, NV = 4096, NQ = 2;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, host_cvalid; nvme_cmd_t host_cmd = '0; nvme_cpl_t host_cpl;
  logic ssd_valid, ssd_ready, ssd_cvalid = 0; nvme_cmd_t ssd_cmd; nvme_cpl_t ssd_cpl = '0;
  logic kernel_busy;
  int checks = 0, failures = 0, cyc = 0;
  ns_accel dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin repeat (200000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  // candidate vector v, element d (zero beyond the 96 features)
  function automatic logic signed [15:0] el(int v, int d);
    if (d >= FEAT) return '0;
    return 16'(((v * 2654435 + d * 40503 + (v >> 3) * 977) % 1021) - 510);
  endfunction
  function automatic logic signed [15:0] qe(int q, int d);
    if (d >= FEAT) return '0;
    return 16'(((d * 73 + q * 311) % 509) - 254);
  endfunction
  function automatic logic [NVME_DW-1:0] beat(int lba);
    logic [NVME_DW-1:0] b;
    for (int e = 0; e < EPB; e++) b[e*16 +: 16] = el(lba / BPV, (lba % BPV) * EPB + e);
    return b;
  endfunction
  assign ssd_ready = 1'b1;
  nvme_cpl_t p1, p0; logic v1 = 0, v0 = 0;
  always @(posedge clk) begin
    v1 <= ssd_valid; p1 <= '{tag: ssd_cmd.tag, status: 0, data: beat(int'(ssd_cmd.lba))};
    ssd_cvalid <= v1; ssd_cpl <= p1;
  end
  task automatic nvme(logic [7:0] op, logic [7:0] tag, int lba, int len, logic [NVME_DW-1:0] d, output nvme_cpl_t c);
    @(negedge clk); host_valid = 1; host_cmd = '{opcode: op, tag: tag, lba: LBA_W'(lba), len: 16'(len), data: d};
    @(posedge clk iff host_ready); @(negedge clk); host_valid = 0;
    @(posedge clk iff (host_cvalid && host_cpl.tag == tag)); c = host_cpl;
  endtask
  nvme_cpl_t c;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int q = 0; q < NQ; q++) begin
      longint rd [NV]; longint srt [$]; int t0, polls;
      for (int b = 0; b < BPV; b++) begin
        logic [NVME_DW-1:0] qb; for (int e = 0; e < EPB; e++) qb[e*16 +: 16] = qe(q, b * EPB + e);
        nvme(ACC_WR_QUERY, 8'h01, 0, 0, qb, c);
      end
      t0 = cyc;
      nvme(ACC_RUN, 8'h02, 0, NV, '0, c); chk(c.status == 0, "run accepted");
      polls = 0;
      do begin repeat (200) @(posedge clk); nvme(ACC_STATUS, 8'h03, 0, 0, '0, c); polls++; end
      while (!c.data[31] && polls < 500);
      chk(c.data[31], "kernel finished");
      $display("query %0d: %0d candidates in %0d cycles (stream needs %0d beats)", q, NV, cyc - t0, NV * BPV);
      chk(cyc - t0 <= NV * BPV * 11 / 10 + 400, "run bound by the input stream");
      for (int v = 0; v < NV; v++) begin
        rd[v] = 0;
        for (int d = 0; d < DIM; d++) begin
          automatic longint df = longint'(el(v, d)) - longint'(qe(q, d)); rd[v] += df * df;
        end
        srt.push_back(rd[v]);
      end
      srt.sort();
      for (int r = 0; r < K; r++) begin
        automatic longint dd; automatic int ix;
        nvme(ACC_RESULT, 8'h10 + 8'(r), r, 0, '0, c);
        dd = longint'(c.data[39:0]); ix = int'(c.data[71:40]);
        chk(dd == srt[r] && ix < NV && rd[ix] == dd, $sformatf("query %0d rank %0d: %0d (idx %0d), expected %0d", q, r, dd, ix, srt[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
