// tb_aim_access_filter: host, local-accelerator and remote (AIMbus) reads and
// writes compete for one DIMM model that answers reads in order after a
// random delay. Each read returns a word derived from its address; the test
// checks that every requester gets exactly its own answers, in order, that
// remote answers go back addressed to the requesting node, that
// accelerator requests marked remote leave on the AIMbus, that the remote
// requester has priority, and that host_rd_pending tracks host reads.
module tb_aim_access_filter;
  import reach_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_valid = 0, host_ready, host_rvalid, host_rd_pending; mem_req_t host_req = '0; logic [63:0] host_rdata;
  logic acc_valid = 0, acc_ready, acc_remote = 0, acc_rvalid; mem_req_t acc_req = '0; logic [NODE_W-1:0] acc_node = '0; logic [63:0] acc_rdata;
  logic bus_in_valid = 0, bus_in_ready, bus_out_valid, bus_out_ready = 1; aimbus_req_t bus_in_req = '0, bus_out_req;
  logic bus_in_rvalid = 0, bus_in_rready, bus_out_rvalid, bus_out_rready = 1; aimbus_resp_t bus_in_resp = '0, bus_out_resp;
  logic dimm_valid, dimm_ready = 1, dimm_rvalid = 0; mem_req_t dimm_req; logic [63:0] dimm_rdata = '0; logic idle;
  int checks = 0, failures = 0, n_host = 0, n_local = 0, n_remote = 0, n_out = 0;
  aim_access_filter #(.NODE_ID(3'd1)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  function automatic logic [63:0] word(logic [31:0] a); return {~a, a}; endfunction
  logic [63:0] exp_host [$], exp_acc [$]; aimbus_resp_t exp_rem [$];
  logic [63:0] dq [$]; int dl [$];
  // DIMM model
  always @(posedge clk) begin
    dimm_rvalid <= 0;
    if (dl.size() > 0 && dl[0] <= 0) begin dimm_rvalid <= 1; dimm_rdata <= dq.pop_front(); void'(dl.pop_front()); end
    foreach (dl[i]) dl[i]--;
    if (dimm_valid && dimm_ready && !dimm_req.we) begin dq.push_back(word(dimm_req.addr)); dl.push_back(int'($urandom % 4)); end
  end
  // observe
  always @(posedge clk) if (rst_n) begin
    if (host_rvalid) begin n_host++; chk(exp_host.size() > 0 && host_rdata == exp_host.pop_front(), "host response"); end
    if (acc_rvalid) begin n_local++; chk(exp_acc.size() > 0 && acc_rdata == exp_acc.pop_front(), "accelerator response"); end
    if (bus_out_rvalid && bus_out_rready) begin n_remote++; chk(exp_rem.size() > 0 && bus_out_resp == exp_rem.pop_front(), "remote response"); end
  end
  bit fh = 0, fa = 0, fb = 0;
  task automatic apply();
    if (fh) begin if (!host_req.we) exp_host.push_back(word(host_req.addr)); host_valid = 0; end
    if (fa) begin
      if (acc_remote) n_out++;
      else if (!acc_req.we) exp_acc.push_back(word(acc_req.addr));
      acc_valid = 0;
    end
    if (fb) begin
      if (!bus_in_req.req.we) exp_rem.push_back('{dst: bus_in_req.src, rdata: word(bus_in_req.req.addr)});
      bus_in_valid = 0;
    end
    fh = 0; fa = 0; fb = 0;
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk); apply();
      dimm_ready = ($urandom % 4) != 0; bus_out_rready = ($urandom % 3) != 0; bus_out_ready = 1'($urandom);
      if (!host_valid && $urandom % 2) begin host_valid = 1; host_req = '{we: 1'($urandom), addr: $urandom, wdata: '0}; end
      if (!acc_valid && $urandom % 2) begin
        acc_valid = 1; acc_remote = ($urandom % 4) == 0; acc_node = 3'd2; acc_req = '{we: 1'($urandom), addr: $urandom, wdata: '0};
      end
      if (!bus_in_valid && $urandom % 3 == 0) begin
        bus_in_valid = 1; bus_in_req = '{dst: 3'd1, src: 3'($urandom % 4), req: '{we: 1'($urandom), addr: $urandom, wdata: '0}};
      end
      #1;
      if (bus_in_valid) chk(!host_ready && !(acc_ready && !acc_remote), "remote requester has priority");
      if (acc_valid && acc_remote) chk(bus_out_valid && bus_out_req.dst == 3'd2 && bus_out_req.src == 3'd1 && bus_out_req.req == acc_req, "remote-marked request leaves on the AIMbus");
      fh = host_valid && host_ready; fa = acc_valid && acc_ready; fb = bus_in_valid && bus_in_ready;
    end
    @(negedge clk); apply();
    @(negedge clk); host_valid = 0; acc_valid = 0; bus_in_valid = 0; bus_out_rready = 1;
    repeat (40) @(posedge clk);
    chk(exp_host.size() == 0 && exp_acc.size() == 0 && exp_rem.size() == 0, "every read answered");
    chk(idle && !host_rd_pending, "idle after drain");
    // a reply arriving over the AIMbus goes to the accelerator
    @(negedge clk); bus_in_rvalid = 1; bus_in_resp = '{dst: 3'd1, rdata: 64'hfeed}; exp_acc.push_back(64'hfeed);
    @(negedge clk); bus_in_rvalid = 0; repeat (2) @(posedge clk);
    chk(exp_acc.size() == 0, "AIMbus reply delivered");
    chk(n_host > 0 && n_local > 0 && n_remote > 0 && n_out > 0, "all paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
