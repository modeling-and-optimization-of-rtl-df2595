// tb_ns_passthrough: host I/O and accelerator DMA commands compete for the
// SSD queue. Checks host priority, that DMA commands carry tag bit 7 and
// host ones do not, and that completions are steered back by that bit.
module tb_ns_passthrough;
  import reach_pkg::*;
  logic io_valid = 0, io_ready, dma_valid = 0, dma_ready, ssd_valid, ssd_ready = 0;
  logic ssd_cvalid = 0, host_cvalid, dma_cvalid;
  nvme_cmd_t io_cmd = '0, dma_cmd = '0, ssd_cmd; nvme_cpl_t ssd_cpl = '0, cpl;
  int checks = 0, failures = 0, n_dma = 0, n_io = 0, n_blocked = 0;
  ns_passthrough dut (.*);
  initial begin #100000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      io_valid = 1'($urandom); dma_valid = 1'($urandom); ssd_ready = 1'($urandom);
      io_cmd.opcode = NVME_READ; io_cmd.tag = 8'($urandom % 128); io_cmd.lba = $urandom;
      dma_cmd.opcode = NVME_READ; dma_cmd.tag = {1'b1, 7'($urandom)}; dma_cmd.lba = $urandom;
      ssd_cvalid = 1'($urandom); ssd_cpl.tag = 8'($urandom); ssd_cpl.data = {16{$urandom}};
      #1;
      checks++;
      if (ssd_valid != (io_valid || dma_valid)) begin failures++; $display("FAIL: ssd_valid"); end
      checks++;
      if (io_valid && (ssd_cmd.lba != io_cmd.lba || ssd_cmd.tag != io_cmd.tag || io_ready != ssd_ready || dma_ready)) begin
        failures++; $display("FAIL: host command must win");
      end
      checks++;
      if (!io_valid && dma_valid && (ssd_cmd.lba != dma_cmd.lba || !ssd_cmd.tag[7] || dma_ready != ssd_ready)) begin
        failures++; $display("FAIL: DMA command");
      end
      checks++;
      if (host_cvalid != (ssd_cvalid && !ssd_cpl.tag[7]) || dma_cvalid != (ssd_cvalid && ssd_cpl.tag[7]) || cpl != ssd_cpl) begin
        failures++; $display("FAIL: completion steering tag %h", ssd_cpl.tag);
      end
      if (io_valid && dma_valid) n_blocked++;
      if (dma_ready && dma_valid) n_dma++;
      if (io_ready && io_valid) n_io++;
      #9;
    end
    checks++; if (n_dma == 0 || n_io == 0 || n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
