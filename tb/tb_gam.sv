// tb_gam: self-checking test of the global accelerator manager.
// The testbench plays the runtime (config writes, command packets) and the
// accelerators (it answers status requests). It checks: launch targets, that
// a dependent task waits for its producer and is preceded by a DMA request
// with translated, correctly sized addresses, that the first status request
// comes the estimated run time after launch, that a "not finished" answer
// re-arms the wait with the new time, the per-thread completion interrupts,
// a memory-controller register write, and back-pressure when one
// accelerator's queue fills (every task still runs once).
module tb_gam;
  import reach_pkg::*;
  localparam int N_ACC = 9;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready; acc_cmd_t cmd = '0;
  logic cfg_valid = 0; gam_cfg_t cfg = '0;
  logic launch_valid, launch_ready = 1; acc_cmd_t launch;
  logic streq_valid, streq_ready = 1; logic [ACC_W-1:0] streq_acc;
  logic stat_valid = 0, stat_ready; acc_status_t stat = '0;
  logic dma_valid, dma_ready = 1; dma_req_t dma; logic dma_tlb_miss;
  logic irq_valid; gam_irq_t irq;
  logic mc_cfg_valid; logic [ACC_W-1:0] mc_cfg_idx; logic mc_cfg_tile_mode; logic [4:0] mc_cfg_tile_log2;
  logic [N_ACC-1:0] acc_free;
  int checks = 0, failures = 0;

  gam #(.N_ACC(N_ACC)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (t=%0d)", msg, cyc); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- accelerator model ----------------
  int launch_cyc [64]; int launch_acc [64]; bit launched [64]; int n_launch = 0;
  int dma_cyc = -1; dma_req_t dma_seen;
  int task_of [N_ACC]; int req_count [64]; int last_req_cyc [64];
  int irq_cyc [16]; int n_irq = 0;
  int resp_delay [$]; int resp_acc [$];
  bit retry_task [64];       // answer "not finished" once
  int mc_pulses = 0; int dma_miss = 0;

  always @(posedge clk) if (rst_n) begin
    if (launch_valid && launch_ready) begin
      launch_cyc[launch.task_id] = cyc; launch_acc[launch.task_id] = int'(launch.acc);
      launched[launch.task_id] = 1; n_launch++; task_of[launch.acc] = int'(launch.task_id);
    end
    if (dma_valid && dma_ready) begin dma_cyc = cyc; dma_seen = dma; if (dma_tlb_miss) dma_miss++; end
    if (irq_valid) begin irq_cyc[irq.thread] = cyc; n_irq++; end
    if (mc_cfg_valid && mc_cfg_idx == 1 && mc_cfg_tile_mode && mc_cfg_tile_log2 == 10) mc_pulses++;
    if (streq_valid && streq_ready) begin
      automatic int t = task_of[streq_acc];
      if (req_count[t] == 0) begin
        // first poll: estimated time after launch (+ queue latency)
        check(cyc - launch_cyc[t] >= est_of(int'(streq_acc)) && cyc - launch_cyc[t] <= est_of(int'(streq_acc)) + 4,
              $sformatf("first poll of task %0d after %0d cycles", t, cyc - launch_cyc[t]));
      end else begin
        check(cyc - last_req_cyc[t] >= 7, $sformatf("re-poll of task %0d too early", t));
      end
      req_count[t]++; last_req_cyc[t] = cyc;
      resp_acc.push_back(int'(streq_acc)); resp_delay.push_back(3);
    end
  end

  function automatic int est_of(int a);
    return (a == 0) ? 20 : (a == 1) ? 30 : (a == 5) ? 12 : 16;
  endfunction

  // send status answers
  initial begin
    forever begin
      @(negedge clk);
      stat_valid = 0;
      if (resp_acc.size() > 0) begin
        automatic int a = resp_acc[0];
        automatic int t = task_of[a];
        stat.acc = ACC_W'(a);
        if (retry_task[t] && req_count[t] == 1) begin
          stat.finished = 0; stat.new_wait = 7;
        end else begin
          stat.finished = 1; stat.tail = 40'h1000 + 40'h100 * t;
        end
        stat_valid = 1;
        @(posedge clk); if (stat_ready) begin void'(resp_acc.pop_front()); void'(resp_delay.pop_front()); end
      end
    end
  end

  task automatic do_cfg(cfg_kind_e k, int idx, logic [ADDR_W-1:0] a, logic [ADDR_W-1:0] b);
    @(negedge clk) cfg_valid = 1; cfg.kind = k; cfg.idx = ACC_W'(idx); cfg.a = a; cfg.b = b;
    @(negedge clk) cfg_valid = 0;
  endtask

  task automatic send(int acc, int thr, int tsk, int inb, int outb, bit dv, int dep);
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{acc: ACC_W'(acc), thread: THREAD_W'(thr), task_id: TASK_W'(tsk), in_buf: BUF_W'(inb),
            out_buf: BUF_W'(outb), dep_valid: dv, dep_task: TASK_W'(dep)};
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
  endtask

  int backpressure = 0;
  always @(posedge clk) if (cmd_valid && !cmd_ready) backpressure++;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    do_cfg(CFG_EST_TIME, 0, 20, 0);
    do_cfg(CFG_EST_TIME, 1, 30, 0);
    do_cfg(CFG_EST_TIME, 5, 12, 0);
    do_cfg(CFG_BUFFER, 1, 40'h1000, 40'h1fff);
    do_cfg(CFG_BUFFER, 2, 40'h8000, 40'h8fff);
    do_cfg(CFG_BUFFER, 3, 40'h1000, 40'h1fff);
    do_cfg(CFG_TLB, 0, 40'h1000, 40'h4_0000);
    do_cfg(CFG_TLB, 1, 40'h8000, 40'h9_0000);
    do_cfg(CFG_MC_MAP, 1, 40'h0a01, 0);
    retry_task[2] = 1;
    // thread 1: on-chip -> NM0 (depends on 1) -> NS0 (depends on 2)
    send(0, 1, 1, 0, 1, 0, 0);
    send(1, 1, 2, 2, 3, 1, 1);
    send(5, 1, 3, 2, 1, 1, 2);
    // thread 2: another on-chip task, must wait for the accelerator
    send(0, 2, 4, 0, 1, 0, 0);
    // thread 3: a burst of tasks for NM3 fills its queue
    for (int t = 10; t < 26; t++) send(4, 3, t, 0, 1, 0, 0);
    repeat (1200) @(negedge clk);

    check(launched[1] && launch_acc[1] == 0, "task 1 on on-chip");
    check(launched[2] && launch_acc[2] == 1, "task 2 on NM0");
    check(launched[3] && launch_acc[3] == 5, "task 3 on NS0");
    check(launch_cyc[2] > last_req_cyc[1], "task 2 waits for task 1");
    check(launch_cyc[3] > last_req_cyc[2], "task 3 waits for task 2");
    check(launch_cyc[4] > last_req_cyc[1], "task 4 waits for the on-chip accelerator");
    check(req_count[2] == 2, "task 2 polled twice (not finished once)");
    check(dma_cyc > 0 && dma_cyc < launch_cyc[3], "DMA before the last dependent launch");
    // last DMA is for task 3: producer task 2 wrote buf 3 (va 0x1000 -> pa 0x40000),
    // tail 0x1200 -> length 0x200; destination buf 2 (va 0x8000 -> pa 0x90000)
    check(dma_seen.src == 40'h4_0000 && dma_seen.dst == 40'h9_0000 && dma_seen.len == 40'h200,
          $sformatf("DMA src %h dst %h len %h", dma_seen.src, dma_seen.dst, dma_seen.len));
    check(dma_miss == 0, "TLB hits");
    check(n_irq == 3, $sformatf("3 interrupts, got %0d", n_irq));
    check(irq_cyc[1] > last_req_cyc[3], "thread 1 interrupt after its last task");
    check(irq_cyc[2] > last_req_cyc[4], "thread 2 interrupt after its task");
    for (int t = 10; t < 26; t++) check(launched[t] && launch_acc[t] == 4, $sformatf("task %0d ran", t));
    check(n_launch == 20, $sformatf("20 launches, got %0d", n_launch));
    check(backpressure > 0, "job queue back-pressure seen");
    check(mc_pulses == 1, "MC register write");
    check(acc_free == '1, "all accelerators free at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
