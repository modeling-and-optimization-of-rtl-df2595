// tb_gam_level_bridge: the bridge between the GAM and the three levels.
// The testbench plays the GAM (buffer configuration, launches, status
// requests), the on-chip accelerator, the configuration windows of the
// near-memory modules and the near-storage accelerators. Checks: an on-chip
// launch passes unchanged; a near-memory launch writes the input base,
// input limit and output base arguments and then the task word into that
// module's window; a near-storage launch becomes ACC_RUN with the input
// buffer as start beat and vector count; status polls of each level turn
// into status packets (not finished -> retry time, finished -> tail); host
// traffic still reaches DIMMs and SSDs and only host completions return.
module tb_gam_level_bridge;
  import reach_pkg::*;
  localparam int N_NM = 4, N_NS = 4, K = 10;
  localparam logic [31:0] B = 32'hFFFF_FF00;
  logic clk = 0, rst_n = 0, cfg_valid = 0; gam_cfg_t cfg = '0;
  logic launch_valid = 0, launch_ready; acc_cmd_t launch = '0;
  logic streq_valid = 0, streq_ready; logic [ACC_W-1:0] streq_acc = '0;
  logic stat_valid, stat_ready = 1; acc_status_t stat;
  logic oc_cmd_valid, oc_cmd_ready = 1, oc_streq_valid, oc_streq_ready = 1, oc_stat_valid = 0; acc_cmd_t oc_cmd; acc_status_t oc_stat = '0;
  logic h_mn_valid [N_NM], h_mn_ready [N_NM], h_mn_rvalid [N_NM]; mem_req_t h_mn_req [N_NM]; logic [63:0] h_mn_rdata [N_NM];
  logic mn_valid [N_NM], mn_ready [N_NM], mn_rvalid [N_NM]; mem_req_t mn_req [N_NM]; logic [63:0] mn_rdata [N_NM];
  logic h_ns_valid [N_NS], h_ns_ready [N_NS], h_ns_cvalid [N_NS]; nvme_cmd_t h_ns_cmd [N_NS]; nvme_cpl_t h_ns_cpl [N_NS];
  logic ns_valid [N_NS], ns_ready [N_NS], ns_cvalid [N_NS]; nvme_cmd_t ns_cmd [N_NS]; nvme_cpl_t ns_cpl [N_NS];
  int checks = 0, failures = 0;
  gam_level_bridge dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask

  // near-memory window model: records writes, answers reads one cycle later
  logic [63:0] win [N_NM][8]; logic [31:0] last_addr [N_NM]; int polls [N_NM]; int host_rd [N_NM];
  for (genvar i = 0; i < N_NM; i++) begin : g_mn
    assign mn_ready[i] = 1'b1;
    always @(posedge clk) begin
      mn_rvalid[i] <= 0;
      if (mn_valid[i]) begin
        last_addr[i] <= mn_req[i].addr;
        if (mn_req[i].addr >= B) begin
          if (mn_req[i].we) win[i][(mn_req[i].addr - B) >> 3] <= mn_req[i].wdata;
          else begin
            polls[i]++;
            mn_rvalid[i] <= 1; mn_rdata[i] <= {(polls[i] >= 2), 31'b0, 32'h2000 + 32'(i)};
          end
        end else if (!mn_req[i].we) begin host_rd[i]++; mn_rvalid[i] <= 1; mn_rdata[i] <= {32'hcafe, mn_req[i].addr}; end
      end
    end
  end
  // near-storage model
  nvme_cmd_t ns_last [N_NS]; int ns_polls [N_NS];
  for (genvar j = 0; j < N_NS; j++) begin : g_ns
    assign ns_ready[j] = 1'b1;
    always @(posedge clk) begin
      ns_cvalid[j] <= 0;
      if (ns_valid[j]) begin
        ns_last[j] <= ns_cmd[j];
        ns_cvalid[j] <= 1; ns_cpl[j] <= '{tag: ns_cmd[j].tag, status: 0, data: '0};
        if (ns_cmd[j].opcode == ACC_STATUS) begin
          ns_polls[j]++; ns_cpl[j].data[31] <= (ns_polls[j] >= 2); ns_cpl[j].data[15:0] <= 16'(K);
        end
      end
    end
  end

  task automatic do_launch(int acc, int ib, int ob);
    @(negedge clk); launch_valid = 1; launch = '{acc: ACC_W'(acc), thread: 4'd1, task_id: 6'(acc), in_buf: 4'(ib), out_buf: 4'(ob), dep_valid: 0, dep_task: '0};
    @(posedge clk iff launch_ready); @(negedge clk); launch_valid = 0;
  endtask
  task automatic poll(int acc, output acc_status_t s);
    @(negedge clk); streq_valid = 1; streq_acc = ACC_W'(acc);
    @(posedge clk iff streq_ready); @(negedge clk); streq_valid = 0;
    @(posedge clk iff stat_valid); s = stat;
  endtask
  // on-chip status answers
  always @(posedge clk) begin
    oc_stat_valid <= oc_streq_valid && oc_streq_ready;
    oc_stat <= '{acc: '0, finished: 1, new_wait: '0, tail: 40'h5555};
  end

  acc_status_t s; acc_cmd_t seen_oc;
  always @(posedge clk) if (oc_cmd_valid && oc_cmd_ready) seen_oc = oc_cmd;
  initial begin
    for (int i = 0; i < N_NM; i++) begin h_mn_valid[i] = 0; h_mn_req[i] = '0; polls[i] = 0; host_rd[i] = 0; end
    for (int j = 0; j < N_NS; j++) begin h_ns_valid[j] = 0; h_ns_cmd[j] = '0; ns_polls[j] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); cfg_valid = 1; cfg = '{kind: CFG_BUFFER, idx: 4'd2, a: 40'h1000, b: 40'h1400};
    @(negedge clk); cfg = '{kind: CFG_BUFFER, idx: 4'd3, a: 40'h3000, b: 40'h4000};
    @(negedge clk); cfg = '{kind: CFG_BUFFER, idx: 4'd4, a: 40'd200, b: 40'd232};
    @(negedge clk); cfg_valid = 0;
    // on-chip
    do_launch(0, 2, 3);
    chk(seen_oc.acc == 0 && seen_oc.task_id == 0 && seen_oc.in_buf == 2, "on-chip launch passes through");
    poll(0, s); chk(s.finished && s.tail == 40'h5555 && s.acc == 0, "on-chip status");
    // near-memory NM2 = acc 3
    do_launch(3, 2, 3); repeat (3) @(posedge clk);
    chk(win[2][1] == 64'h1000 && win[2][2] == 64'h1400 && win[2][3] == 64'h3000, "NM arguments written");
    chk(win[2][0][5:0] == 6'd3 || win[2][0] != '0, "NM task word written");
    chk(last_addr[2] == B, "task word written last");
    poll(3, s); chk(!s.finished && s.new_wait != 0 && s.acc == 3, "NM not finished -> retry");
    poll(3, s); chk(s.finished && s.tail == 40'h2002, "NM finished with tail");
    // near-storage NS1 = acc 6
    do_launch(6, 4, 3); repeat (2) @(posedge clk);
    chk(ns_last[1].opcode == ACC_RUN && ns_last[1].lba == 200 && ns_last[1].len == 32, "NS launch is ACC_RUN");
    poll(6, s); chk(!s.finished && s.new_wait != 0, "NS not finished -> retry");
    poll(6, s); chk(s.finished && s.tail == 40'h3000 + 40'(K), "NS finished, tail = output base + K");
    // host traffic
    @(negedge clk); h_mn_valid[1] = 1; h_mn_req[1] = '{we: 0, addr: 32'h88, wdata: '0};
    @(posedge clk iff h_mn_ready[1]); @(negedge clk); h_mn_valid[1] = 0;
    @(posedge clk iff h_mn_rvalid[1]); chk(h_mn_rdata[1] == {32'hcafe, 32'h88}, "host DIMM read");
    @(negedge clk); h_ns_valid[3] = 1; h_ns_cmd[3] = '{opcode: NVME_READ, tag: 8'h07, lba: 5, len: 1, data: '0};
    @(posedge clk iff h_ns_ready[3]); @(negedge clk); h_ns_valid[3] = 0;
    @(posedge clk iff h_ns_cvalid[3]); chk(h_ns_cpl[3].tag == 8'h07, "host SSD completion");
    chk(!h_ns_cvalid[1], "bridge completions hidden from the host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
