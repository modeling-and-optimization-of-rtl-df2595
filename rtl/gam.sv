// gam: global accelerator manager of the ReACH compute hierarchy.
//
// A hardware manager beside the CPU cores that is master of every
// accelerator in the hierarchy (accelerator 0 = on-chip, then the near-memory
// ones NM0.., then the near-storage ones NS0..). It
//  1. takes ACC command packets (one task each) from the cores into a job
//     queue;
//  2. dispatches each task to the queue of its target accelerator;
//  3. launches the head task of an accelerator's queue when the accelerator is
//     free and the task's dependency has finished, recording thread, task,
//     output buffer and estimated run time in the accelerator progress table;
//  4. before launching a dependent task, issues a DMA request that copies the
//     producer's output (from its output buffer base up to the tail address
//     the producer reported) into the dependent task's input buffer; buffer
//     addresses come from the buffer table and are translated by the TLB;
//  5. counts down each running task's wait time; at zero it sends a status
//     request packet to the accelerator (accelerators in memory or storage
//     cannot signal completion themselves). The returned status packet either
//     says finished (the accelerator becomes free, the task is marked done and
//     its tail address kept) or gives a new wait time;
//  6. raises an interrupt with the thread id when the last outstanding task of
//     a software thread finishes.
// Estimated run times per accelerator (from the kernels' synthesis reports),
// buffer table entries, TLB entries and the memory-controller interleave
// registers are written through the `cfg` port.
//
// From the design: the command and status packet fields, the job queue with
// task dispatch into per-accelerator queues, the progress table columns
// free / thread / task / wait time / output stream, the status queues, the
// buffer table, polling by status request when the wait time runs out, DMA
// forwarding to dependent tasks, the host interrupt and the MC register
// writes. This implementation's choices: queue depths, field widths, one
// launch at a time with round-robin choice between ready accelerators,
// dependencies named by task id (a task waits at the head of its queue until
// the producer is done, so the progress table keeps no separate waiting-task
// list), and "job complete" meaning no task of that thread is queued or
// running.
//
// Handshakes: valid/ready on cmd, launch, streq, stat and dma; cfg, irq and
// mc_cfg are single-cycle strobes.
module gam
  import reach_pkg::*;
#(
  parameter int unsigned N_ACC       = 9,
  parameter int unsigned JOBQ_DEPTH  = 8,
  parameter int unsigned ACCQ_DEPTH  = 4,
  parameter int unsigned STATQ_DEPTH = 4,
  parameter int unsigned N_BUF       = 16,
  parameter int unsigned TLB_ENTRIES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // job requests from the cores (GAM driver)
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  acc_cmd_t          cmd,
  // configuration from the runtime
  input  logic              cfg_valid,
  input  gam_cfg_t          cfg,
  // task launch to an accelerator
  output logic              launch_valid,
  input  logic              launch_ready,
  output acc_cmd_t          launch,
  // status request packets
  output logic              streq_valid,
  input  logic              streq_ready,
  output logic [ACC_W-1:0]  streq_acc,
  // returned status packets
  input  logic              stat_valid,
  output logic              stat_ready,
  input  acc_status_t       stat,
  // DMA requests forwarding outputs to dependent tasks
  output logic              dma_valid,
  input  logic              dma_ready,
  output dma_req_t          dma,
  output logic              dma_tlb_miss,
  // interrupt to the host core
  output logic              irq_valid,
  output gam_irq_t          irq,
  // memory-controller interleave register write
  output logic              mc_cfg_valid,
  output logic [ACC_W-1:0]  mc_cfg_idx,
  output logic              mc_cfg_tile_mode,
  output logic [4:0]        mc_cfg_tile_log2,
  // progress table view
  output logic [N_ACC-1:0]  acc_free
);
  localparam int unsigned N_TASK   = 1 << TASK_W;
  localparam int unsigned N_THREAD = 1 << THREAD_W;
  localparam int unsigned BI_W     = $clog2(N_BUF);
  localparam int unsigned OUT_W    = 8;   // outstanding tasks per thread

  // ------------------------------------------------------------ tables ----
  typedef struct packed {
    logic                free;
    logic                running;
    logic                req_pending;
    logic [THREAD_W-1:0] thread;
    logic [TASK_W-1:0]   task_id;
    logic [TIME_W-1:0]   wait_time;
    logic [BUF_W-1:0]    out_buf;
  } progress_t;

  progress_t         prog [N_ACC];
  logic [TIME_W-1:0] est  [N_ACC];
  logic              task_done   [N_TASK];
  logic [ADDR_W-1:0] task_tail   [N_TASK];
  logic [BUF_W-1:0]  task_outbuf [N_TASK];
  logic [OUT_W-1:0]  outstanding [N_THREAD];

  // --------------------------------------------------------- job queue ----
  acc_cmd_t jq_head;
  logic     jq_empty, jq_full, jq_pop;
  assign cmd_ready = !jq_full;

  reach_fifo #(.T(acc_cmd_t), .DEPTH(JOBQ_DEPTH)) u_jobq (
    .clk, .rst_n, .push(cmd_valid && cmd_ready), .din(cmd),
    .pop(jq_pop), .head(jq_head), .empty(jq_empty), .full(jq_full)
  );

  // ---------------------------------------- per-accelerator task queues ----
  acc_cmd_t aq_head  [N_ACC];
  logic     aq_empty [N_ACC];
  logic     aq_full  [N_ACC];
  logic     aq_push  [N_ACC];
  logic     aq_pop   [N_ACC];

  // task dispatch: one task per cycle from the job queue to its target queue
  logic dispatch_ok;
  always_comb begin
    dispatch_ok = !jq_empty && (32'(jq_head.acc) < N_ACC) && !aq_full[jq_head.acc];
    jq_pop      = dispatch_ok || (!jq_empty && 32'(jq_head.acc) >= N_ACC);  // drop bad ids
    for (int a = 0; a < N_ACC; a++) aq_push[a] = dispatch_ok && (32'(jq_head.acc) == a);
  end

  for (genvar a = 0; a < N_ACC; a++) begin : g_accq
    reach_fifo #(.T(acc_cmd_t), .DEPTH(ACCQ_DEPTH)) u_q (
      .clk, .rst_n, .push(aq_push[a]), .din(jq_head),
      .pop(aq_pop[a]), .head(aq_head[a]), .empty(aq_empty[a]), .full(aq_full[a])
    );
  end

  // ------------------------------------------------- buffer table & TLB ----
  acc_cmd_t          cur;            // task being launched
  logic [ACC_W-1:0]  cur_acc;
  logic [ADDR_W-1:0] src_base, src_limit, dst_base, dst_limit;
  logic [ADDR_W-1:0] src_pa, dst_pa;
  logic              src_hit, dst_hit;

  gam_buffer_table #(.N_BUF(N_BUF)) u_buftab (
    .clk, .rst_n,
    .wr_en(cfg_valid && cfg.kind == CFG_BUFFER), .wr_id(BI_W'(cfg.idx)),
    .wr_base(cfg.a), .wr_limit(cfg.b),
    .rd_id_a(BI_W'(task_outbuf[cur.dep_task])), .base_a(src_base), .limit_a(src_limit),
    .rd_id_b(BI_W'(cur.in_buf)), .base_b(dst_base), .limit_b(dst_limit)
  );

  gam_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .fill(cfg_valid && cfg.kind == CFG_TLB), .fill_idx($clog2(TLB_ENTRIES)'(cfg.idx)),
    .fill_va(cfg.a), .fill_pa(cfg.b),
    .va_a(src_base), .pa_a(src_pa), .hit_a(src_hit),
    .va_b(dst_base), .pa_b(dst_pa), .hit_b(dst_hit)
  );

  // ------------------------------------------------------------ launch ----
  typedef enum logic [1:0] {L_IDLE, L_DMA, L_LAUNCH} lstate_e;
  lstate_e           lstate;
  logic [ACC_W-1:0]  rr;
  logic              pick_ok;
  logic [ACC_W-1:0]  pick;

  function automatic logic ready_to_run(int a);
    return prog[a].free && !aq_empty[a] &&
           (!aq_head[a].dep_valid || task_done[aq_head[a].dep_task]);
  endfunction

  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = N_ACC - 1; k >= 0; k--) begin
      automatic int a = (32'(rr) + k) % N_ACC;
      if (ready_to_run(a)) begin pick_ok = 1'b1; pick = ACC_W'(a); end
    end
    for (int a = 0; a < N_ACC; a++) aq_pop[a] = (lstate == L_IDLE) && pick_ok && (pick == ACC_W'(a));
  end

  assign dma_valid    = (lstate == L_DMA);
  assign dma.src      = src_pa;
  assign dma.dst      = dst_pa;
  // length: producer's output up to its tail, clipped to both buffers' bounds
  logic [ADDR_W-1:0] src_end, len_src, len_dst;
  always_comb begin
    src_end = (task_tail[cur.dep_task] > src_limit) ? src_limit : task_tail[cur.dep_task];
    len_src = src_end - src_base;
    len_dst = dst_limit - dst_base;
  end
  assign dma.len      = (len_src > len_dst) ? len_dst : len_src;
  assign dma_tlb_miss = dma_valid && !(src_hit && dst_hit);
  assign launch_valid = (lstate == L_LAUNCH);
  assign launch       = cur;

  // --------------------------------------------------- status requests ----
  logic             srq_push, srq_empty, srq_full;
  logic [ACC_W-1:0] srq_din;
  always_comb begin
    srq_push = 1'b0;
    srq_din  = '0;
    for (int a = N_ACC - 1; a >= 0; a--)
      if (prog[a].running && !prog[a].req_pending && prog[a].wait_time == '0) begin
        srq_push = !srq_full; srq_din = ACC_W'(a);
      end
  end
  assign streq_valid = !srq_empty;

  reach_fifo #(.T(logic [ACC_W-1:0]), .DEPTH(STATQ_DEPTH)) u_streq_q (
    .clk, .rst_n, .push(srq_push), .din(srq_din),
    .pop(streq_valid && streq_ready), .head(streq_acc), .empty(srq_empty), .full(srq_full)
  );

  // ------------------------------------------------- returned statuses ----
  acc_status_t st;
  logic        st_empty, st_full, st_take;
  assign stat_ready = !st_full;
  assign st_take    = !st_empty;

  reach_fifo #(.T(acc_status_t), .DEPTH(STATQ_DEPTH)) u_stat_q (
    .clk, .rst_n, .push(stat_valid && stat_ready), .din(stat),
    .pop(st_take), .head(st), .empty(st_empty), .full(st_full)
  );

  logic st_fin;
  assign st_fin = st_take && st.finished && (32'(st.acc) < N_ACC) && prog[st.acc].running;

  // ------------------------------------------------------------- state ----
  logic cmd_acc;
  assign cmd_acc = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE; rr <= '0; cur <= '0; cur_acc <= '0;
      irq_valid <= 1'b0; irq <= '0;
      mc_cfg_valid <= 1'b0; mc_cfg_idx <= '0; mc_cfg_tile_mode <= 1'b0; mc_cfg_tile_log2 <= '0;
      for (int a = 0; a < N_ACC; a++) begin
        prog[a] <= '{free: 1'b1, default: '0};
        est[a]  <= TIME_W'(16);
      end
      for (int t = 0; t < N_TASK; t++) begin
        task_done[t] <= 1'b0; task_tail[t] <= '0; task_outbuf[t] <= '0;
      end
      for (int h = 0; h < N_THREAD; h++) outstanding[h] <= '0;
    end else begin
      irq_valid    <= 1'b0;
      mc_cfg_valid <= 1'b0;

      // configuration
      if (cfg_valid) begin
        case (cfg.kind)
          CFG_EST_TIME: if (32'(cfg.idx) < N_ACC) est[cfg.idx] <= TIME_W'(cfg.a);
          CFG_MC_MAP: begin
            mc_cfg_valid     <= 1'b1;
            mc_cfg_idx       <= cfg.idx;
            mc_cfg_tile_mode <= cfg.a[0];
            mc_cfg_tile_log2 <= cfg.a[12:8];
          end
          default: ;
        endcase
      end

      // new task: its id becomes not-done, its thread has one more task
      if (cmd_acc) task_done[cmd.task_id] <= 1'b0;

      // outstanding-task bookkeeping and the job-complete interrupt
      for (int h = 0; h < N_THREAD; h++) begin
        automatic logic inc, dec;
        inc = cmd_acc && (32'(cmd.thread) == h);
        dec = st_fin && (32'(prog[st.acc].thread) == h);
        if (inc && !dec) outstanding[h] <= outstanding[h] + 1'b1;
        if (dec && !inc) begin
          outstanding[h] <= outstanding[h] - 1'b1;
          if (outstanding[h] == OUT_W'(1)) begin
            irq_valid  <= 1'b1;
            irq.thread <= THREAD_W'(h);
          end
        end
      end

      // wait-time countdown
      for (int a = 0; a < N_ACC; a++)
        if (prog[a].running && prog[a].wait_time != '0) prog[a].wait_time <= prog[a].wait_time - 1'b1;
      if (srq_push) prog[srq_din].req_pending <= 1'b1;

      // status packet
      if (st_take && 32'(st.acc) < N_ACC) begin
        prog[st.acc].req_pending <= 1'b0;
        if (st_fin) begin
          prog[st.acc].free    <= 1'b1;
          prog[st.acc].running <= 1'b0;
          task_done[prog[st.acc].task_id] <= 1'b1;
          task_tail[prog[st.acc].task_id] <= st.tail;
        end else if (!st.finished) begin
          prog[st.acc].wait_time <= st.new_wait;
        end
      end

      // launch sequencing
      case (lstate)
        L_IDLE: if (pick_ok) begin
          cur     <= aq_head[pick];
          cur_acc <= pick;
          prog[pick].free <= 1'b0;                  // reserved
          rr      <= (32'(pick) == N_ACC - 1) ? '0 : pick + 1'b1;
          lstate  <= aq_head[pick].dep_valid ? L_DMA : L_LAUNCH;
        end
        L_DMA: if (dma_ready) lstate <= L_LAUNCH;
        L_LAUNCH: if (launch_ready) begin
          prog[cur_acc].running     <= 1'b1;
          prog[cur_acc].req_pending <= 1'b0;
          prog[cur_acc].thread      <= cur.thread;
          prog[cur_acc].task_id     <= cur.task_id;
          prog[cur_acc].wait_time   <= est[cur_acc];
          prog[cur_acc].out_buf     <= cur.out_buf;
          task_outbuf[cur.task_id]  <= cur.out_buf;
          lstate <= L_IDLE;
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  always_comb for (int a = 0; a < N_ACC; a++) acc_free[a] = prog[a].free;

  a_launch_stable: assert property (@(posedge clk) disable iff (!rst_n)
    launch_valid && !launch_ready |=> launch_valid && $stable(launch));
  a_dma_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_valid && !dma_ready |=> dma_valid && $stable(dma));
endmodule
