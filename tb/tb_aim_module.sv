// tb_aim_module: one AIM module between a host model, a DIMM model (in-order
// reads, random delay) and a fabric model. Sequence: host writes and reads
// the DIMM; the host writes the kernel arguments and launches it through
// the configuration window; while the kernel owns the DIMM a host request
// is held, the fabric reads the DIMM and sends a remote-marked request out
// on the AIMbus, and a request arriving from another module is served and
// answered over the AIMbus; at fab_done the module drains, strobes
// precharge-all exactly once, returns the DIMM, and a status read shows
// finished with the tail; the held host request then completes.
module tb_aim_module;
  import reach_pkg::*;
  localparam logic [31:0] B = 32'hFFFF_FF00;
  logic clk = 0, rst_n = 0;
  logic mn_valid = 0, mn_ready, mn_rvalid; mem_req_t mn_req = '0; logic [63:0] mn_rdata;
  logic dimm_valid, dimm_ready = 1, dimm_rvalid = 0, dimm_pre_all; mem_req_t dimm_req; logic [63:0] dimm_rdata = '0;
  logic bus_req_out_valid, bus_req_out_ready = 1, bus_req_in_valid = 0, bus_req_in_ready; aimbus_req_t bus_req_out, bus_req_in = '0;
  logic bus_rsp_out_valid, bus_rsp_out_ready = 1, bus_rsp_in_valid = 0, bus_rsp_in_ready; aimbus_resp_t bus_rsp_out, bus_rsp_in = '0;
  logic fab_start; logic [63:0] fab_task, fab_args [8];
  logic fab_mem_valid = 0, fab_mem_ready, fab_mem_remote = 0, fab_mem_rvalid; mem_req_t fab_mem_req = '0;
  logic [NODE_W-1:0] fab_mem_node = '0; logic [63:0] fab_mem_rdata; logic fab_done = 0; logic [31:0] fab_tail = '0;
  logic acc_owns_dimm;
  int checks = 0, failures = 0, n_pre = 0, n_start = 0;
  aim_module #(.NODE_ID(3'd0)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  logic [63:0] mem [logic [31:0]]; logic [63:0] dq [$]; int dl [$];
  always @(posedge clk) begin
    dimm_rvalid <= 0;
    if (dl.size() > 0 && dl[0] <= 0) begin dimm_rvalid <= 1; dimm_rdata <= dq.pop_front(); void'(dl.pop_front()); end
    foreach (dl[i]) dl[i]--;
    if (dimm_valid && dimm_ready) begin
      if (dimm_req.we) mem[dimm_req.addr] = dimm_req.wdata;
      else begin dq.push_back(mem.exists(dimm_req.addr) ? mem[dimm_req.addr] : 64'hdead); dl.push_back(int'($urandom % 3)); end
    end
    if (rst_n && dimm_pre_all) n_pre++;
    if (rst_n && fab_start) n_start++;
  end
  task automatic host(bit we, logic [31:0] a, logic [63:0] d, output logic [63:0] r);
    @(negedge clk); mn_valid = 1; mn_req = '{we: we, addr: a, wdata: d};
    @(posedge clk iff mn_ready); @(negedge clk); mn_valid = 0;
    if (!we) begin @(posedge clk iff mn_rvalid); r = mn_rdata; end
  endtask
  task automatic fab_rd(logic [31:0] a, output logic [63:0] r);
    @(negedge clk); fab_mem_valid = 1; fab_mem_remote = 0; fab_mem_req = '{we: 0, addr: a, wdata: '0};
    @(posedge clk iff fab_mem_ready); @(negedge clk); fab_mem_valid = 0;
    @(posedge clk iff fab_mem_rvalid); r = fab_mem_rdata;
  endtask
  logic [63:0] r;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) host(1, 32'h100 + 32'(i * 8), 64'h1000 + 64'(i), r);
    for (int i = 0; i < 8; i++) begin host(0, 32'h100 + 32'(i * 8), '0, r); chk(r == 64'h1000 + 64'(i), "host read-back"); end
    host(1, B + 8, 64'h100, r); host(1, B + 16, 64'h140, r);
    host(0, B + 8, '0, r); chk(r == 64'h100, "argument register");
    host(1, B, 64'h7, r);
    repeat (2) @(posedge clk);
    chk(n_start == 1 && acc_owns_dimm && fab_task == 64'h7 && fab_args[1] == 64'h100, "launch hands the DIMM to the kernel");
    fork
      begin : held
        logic [63:0] hr;
        host(0, 32'h108, '0, hr);
        chk(!acc_owns_dimm && n_pre == 1, "host request held until the DIMM is handed back");
        chk(hr == 64'h1001, "held host read data");
      end
      begin
        fab_rd(32'h110, r); chk(r == 64'h1002, "fabric local read");
        // remote-marked request goes out on the AIMbus
        @(negedge clk); fab_mem_valid = 1; fab_mem_remote = 1; fab_mem_node = 3'd3; fab_mem_req = '{we: 0, addr: 32'h40, wdata: '0};
        #1 chk(bus_req_out_valid && bus_req_out.dst == 3'd3 && bus_req_out.src == 3'd0, "remote request on the AIMbus");
        @(posedge clk iff fab_mem_ready); @(negedge clk); fab_mem_valid = 0;
        @(negedge clk); bus_rsp_in_valid = 1; bus_rsp_in = '{dst: 3'd0, rdata: 64'hbeef};
        #1 chk(fab_mem_rvalid && fab_mem_rdata == 64'hbeef, "remote reply to the fabric");
        @(negedge clk); bus_rsp_in_valid = 0;
        // a request from node 2 is served by this DIMM
        bus_req_in_valid = 1; bus_req_in = '{dst: 3'd0, src: 3'd2, req: '{we: 0, addr: 32'h118, wdata: '0}};
        @(posedge clk iff bus_req_in_ready); @(negedge clk); bus_req_in_valid = 0;
        @(posedge clk iff bus_rsp_out_valid);
        chk(bus_rsp_out.dst == 3'd2 && bus_rsp_out.rdata == 64'h1003, "remote request answered over the AIMbus");
        repeat (5) @(posedge clk);
        chk(n_pre == 0 && acc_owns_dimm, "DIMM stays with the kernel");
        @(negedge clk); fab_done = 1; fab_tail = 32'h180; @(negedge clk); fab_done = 0;
      end
    join
    host(0, B, '0, r);
    chk(r[63] && !r[62] && r[31:0] == 32'h180, "status: finished with tail");
    repeat (5) @(posedge clk);
    chk(n_pre == 1, "exactly one precharge-all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
