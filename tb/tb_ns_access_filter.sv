// tb_ns_access_filter: random NVMe commands with random ready signals;
// checks that vendor opcodes 0xC0-0xFF go only to the accelerator, all
// others only to the pass-through path, that the command is unchanged and
// that host_ready follows the chosen side.
module tb_ns_access_filter;
  import reach_pkg::*;
  logic host_valid = 0, host_ready, acc_valid, acc_ready = 0, io_valid, io_ready = 0;
  nvme_cmd_t host_cmd = '0, cmd;
  int checks = 0, failures = 0, n_acc = 0, n_io = 0;
  ns_access_filter dut (.*);
  initial begin #100000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic bit is_acc;
      host_valid = 1'($urandom); acc_ready = 1'($urandom); io_ready = 1'($urandom);
      host_cmd.opcode = (n % 4 == 0) ? NVME_READ : (n % 4 == 1) ? NVME_WRITE : 8'($urandom);
      host_cmd.tag = 8'($urandom); host_cmd.lba = $urandom; host_cmd.data = {16{$urandom}};
      #1;
      is_acc = host_cmd.opcode >= 8'hC0;
      checks++;
      if (acc_valid != (host_valid && is_acc) || io_valid != (host_valid && !is_acc) ||
          host_ready != (is_acc ? acc_ready : io_ready) || cmd != host_cmd) begin
        failures++; $display("FAIL: opcode %h", host_cmd.opcode);
      end
      if (acc_valid) n_acc++;
      if (io_valid) n_io++;
      #9;
    end
    checks++; if (n_acc == 0 || n_io == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
