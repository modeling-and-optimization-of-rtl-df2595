// tb_ns_dma: the DMA of the near-storage accelerator reads a run of beats
// from an SSD model with random latency and random back-pressure. Checks
// the command stream (consecutive LBAs, tag bit 7, never more than the
// buffer depth outstanding), that the beats come out in order and complete,
// and that busy falls after the last beat.
module tb_ns_dma;
  import reach_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, cmd_valid, cmd_ready = 0, cpl_valid = 0, out_valid, out_ready = 0;
  logic [LBA_W-1:0] lba = '0, nbeats = '0; nvme_cmd_t cmd; nvme_cpl_t cpl = '0; logic [NVME_DW-1:0] out_data;
  int checks = 0, failures = 0, outstanding = 0, max_out = 0;
  ns_dma dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [NVME_DW-1:0] bt(logic [LBA_W-1:0] a); return {16{a ^ 32'h5a5a0000}}; endfunction
  logic [LBA_W-1:0] pend [$]; int lat [$];
  logic [LBA_W-1:0] exp_lba; int got;
  // SSD model: accepts at random, answers in order after a random delay
  always @(posedge clk) begin
    cpl_valid <= 0;
    if (lat.size() > 0 && lat[0] <= 0) begin
      cpl_valid <= 1; cpl <= '{tag: 8'h80, status: 0, data: bt(pend.pop_front())}; void'(lat.pop_front());
    end
    foreach (lat[i]) lat[i]--;
    if (cmd_valid && cmd_ready) begin
      checks++;
      if (cmd.lba != exp_lba || !cmd.tag[7] || cmd.opcode != NVME_READ) begin failures++; $display("FAIL: cmd lba %0d", cmd.lba); end
      exp_lba++; pend.push_back(cmd.lba); lat.push_back(int'($urandom % 6));
    end
    outstanding <= outstanding + int'(cmd_valid && cmd_ready) - int'(out_valid && out_ready);
    if (outstanding > max_out) max_out = outstanding;
  end
  always @(negedge clk) begin cmd_ready = 1'($urandom); out_ready = ($urandom % 4) != 0; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      automatic logic [LBA_W-1:0] base = $urandom % 1000; automatic int nb = 1 + int'($urandom % 40);
      exp_lba = base; got = 0;
      @(negedge clk); start = 1; lba = base; nbeats = nb; @(negedge clk); start = 0;
      while (busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++; if (out_data != bt(base + got)) begin failures++; $display("FAIL: beat %0d", got); end
          got++;
        end
      end
      checks++; if (got != nb) begin failures++; $display("FAIL: %0d of %0d beats", got, nb); end
      repeat (10) @(posedge clk);
    end
    checks++; if (max_out > 8) begin failures++; $display("FAIL: %0d outstanding", max_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
