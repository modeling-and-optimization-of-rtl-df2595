// tb_aim_config_filter: drives random host requests at an AIM configuration
// filter. Checks that window accesses never reach the DIMM side, that
// argument registers read back what was written (one cycle later), that a
// word-0 write gives a one-cycle launch pulse with the task word, that the
// status word carries finished/running/tail, that ordinary requests pass
// unchanged but are held while the kernel runs, and that config reads wait
// for outstanding host reads.
module tb_aim_config_filter;
  import reach_pkg::*;
  localparam logic [31:0] B = 32'hFFFF_FF00;
  logic clk = 0, rst_n = 0, mn_valid = 0, mn_ready, cfg_rvalid, fwd_valid, fwd_ready = 1, host_rd_pending = 0;
  mem_req_t mn_req = '0, fwd_req; logic [63:0] cfg_rdata, acc_task, acc_args [8];
  logic acc_start, acc_running = 0, acc_finished = 0; logic [31:0] acc_tail = '0;
  int checks = 0, failures = 0, n_start = 0, n_held = 0;
  logic [63:0] regs [8];
  aim_config_filter dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  always @(posedge clk) if (acc_start) n_start++;
  initial begin
    foreach (regs[i]) regs[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic bit cfg = $urandom % 2; automatic int w = $urandom % 8;
      automatic bit fire, rd;
      @(negedge clk);
      acc_running = (n % 100) > 70; acc_finished = 1'($urandom); acc_tail = $urandom;
      host_rd_pending = ($urandom % 4) == 0; fwd_ready = ($urandom % 4) != 0;
      mn_valid = 1; mn_req = '{we: 1'($urandom), addr: cfg ? B + 32'(w * 8) : ($urandom % 32'h1000_0000), wdata: {$urandom, $urandom}};
      #1;
      fire = mn_valid && mn_ready; rd = !mn_req.we;
      if (cfg) begin
        chk(!fwd_valid, "window access leaked to the DIMM");
        chk(mn_ready == (mn_req.we || !host_rd_pending), "config read held while host reads pending");
      end else begin
        chk(fwd_valid == !acc_running && fwd_req == mn_req, "forwarding");
        chk(mn_ready == (fwd_ready && !acc_running), "held while the kernel owns the DIMM");
        if (acc_running) n_held++;
      end
      @(posedge clk); #1;
      if (cfg && fire) begin
        if (mn_req.we && w == 0) chk(acc_start == !acc_running && acc_task == mn_req.wdata, "launch pulse");
        else if (mn_req.we) begin regs[w] = mn_req.wdata; chk(acc_args[w] == regs[w], "argument register"); end
        else if (w == 0) chk(cfg_rvalid && cfg_rdata == {acc_finished, acc_running, 30'b0, acc_tail}, "status word");
        else chk(cfg_rvalid && cfg_rdata == regs[w], "argument read-back");
      end else chk(!acc_start && !cfg_rvalid, "no spurious pulse");
    end
    chk(n_start > 0 && n_held > 0, "launches and holds happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
