// gam_level_bridge: the paths from the GAM to the accelerators of each level.
//
// The GAM speaks in command and status packets; the accelerators are reached
// in three different ways, and this block performs the translation:
//   on-chip      packets are passed straight to the on-chip accelerator port;
//   near-memory  through the memory controllers: a launch becomes writes of
//                the argument words (input buffer base and limit, output
//                buffer base) and then of the task word into the AIM
//                module's configuration window; a status request becomes a
//                read of configuration word 0, whose finished bit and tail
//                address form the status packet;
//   near-storage through the PCIe path: a launch becomes a vendor NVMe
//                ACC_RUN command (first beat = input buffer base, vector
//                count = limit - base); a status request becomes ACC_STATUS,
//                and a finished answer reports tail = output buffer base + K.
// The bridge shares each AIM memory port and each SSD host port with the
// host's own traffic, giving its own accesses priority. It handles one launch
// and one status request at a time. Buffer addresses come from a copy of the
// GAM buffer table, kept by watching the GAM configuration writes. An
// unfinished near-memory or near-storage poll answers with RETRY_WAIT
// cycles as the new wait time.
//
// The three launch paths (kernel launch by configuration-filter write for
// near-memory, by user-defined NVMe command for near-storage, direct for
// on-chip) follow the design; the argument layout, tag use, retry time and
// serialisation are this implementation's choices.
module gam_level_bridge
  import reach_pkg::*;
#(
  parameter int unsigned       N_NM       = 4,
  parameter int unsigned       N_NS       = 4,
  parameter int unsigned       N_BUF      = 16,
  parameter int unsigned       K          = 10,
  parameter logic [MEM_AW-1:0] CFG_BASE   = 32'hFFFF_FF00,
  parameter int unsigned       RETRY_WAIT = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // from / to the GAM
  input  logic              cfg_valid,
  input  gam_cfg_t          cfg,
  input  logic              launch_valid,
  output logic              launch_ready,
  input  acc_cmd_t          launch,
  input  logic              streq_valid,
  output logic              streq_ready,
  input  logic [ACC_W-1:0]  streq_acc,
  output logic              stat_valid,
  input  logic              stat_ready,
  output acc_status_t       stat,
  // on-chip accelerator
  output logic              oc_cmd_valid,
  input  logic              oc_cmd_ready,
  output acc_cmd_t          oc_cmd,
  output logic              oc_streq_valid,
  input  logic              oc_streq_ready,
  input  logic              oc_stat_valid,
  input  acc_status_t       oc_stat,
  // host traffic towards the near-memory DIMMs
  input  logic              h_mn_valid  [N_NM],
  output logic              h_mn_ready  [N_NM],
  input  mem_req_t          h_mn_req    [N_NM],
  output logic              h_mn_rvalid [N_NM],
  output logic [MEM_DW-1:0] h_mn_rdata  [N_NM],
  // AIM module memory ports
  output logic              mn_valid    [N_NM],
  input  logic              mn_ready    [N_NM],
  output mem_req_t          mn_req      [N_NM],
  input  logic              mn_rvalid   [N_NM],
  input  logic [MEM_DW-1:0] mn_rdata    [N_NM],
  // host traffic towards the SSDs
  input  logic              h_ns_valid  [N_NS],
  output logic              h_ns_ready  [N_NS],
  input  nvme_cmd_t         h_ns_cmd    [N_NS],
  output logic              h_ns_cvalid [N_NS],
  output nvme_cpl_t         h_ns_cpl    [N_NS],
  // near-storage accelerator host ports
  output logic              ns_valid    [N_NS],
  input  logic              ns_ready    [N_NS],
  output nvme_cmd_t         ns_cmd      [N_NS],
  input  logic              ns_cvalid   [N_NS],
  input  nvme_cpl_t         ns_cpl      [N_NS]
);
  localparam int unsigned BI_W = $clog2(N_BUF);
  localparam logic [NVME_TAG_W-1:0] TAG_RUN  = 8'h40;
  localparam logic [NVME_TAG_W-1:0] TAG_STAT = 8'h41;

  // ---------------------------------------------- buffer table copy -----
  logic [ADDR_W-1:0] bbase [N_BUF];
  logic [ADDR_W-1:0] blim  [N_BUF];

  // ------------------------------------------------------ launch FSM ----
  typedef enum logic [2:0] {L_IDLE, L_OC, L_NM, L_NS, L_NS_CPL} lst_e;
  lst_e             lst;
  logic [1:0]       l_word;          // near-memory: args 1..3, then task word 0
  acc_cmd_t         lc;
  int unsigned      l_tgt;

  // ------------------------------------------------------ status FSM ----
  typedef enum logic [2:0] {S_IDLE, S_OC, S_OC_WAIT, S_NM_RD, S_NM_WAIT, S_NS_CMD, S_NS_WAIT, S_OUT} sst_e;
  sst_e             sst;
  logic [ACC_W-1:0] s_acc;
  int unsigned      s_tgt;
  acc_status_t      s_pkt;
  logic [BUF_W-1:0] s_outbuf [1 + N_NM + N_NS];   // output buffer of each accelerator's task

  function automatic int unsigned level_of(logic [ACC_W-1:0] a);   // 0 oc, 1 nm, 2 ns
    if (a == '0) return 0;
    else if (32'(a) <= N_NM) return 1;
    else return 2;
  endfunction

  // port indices of the current launch / status targets
  localparam int unsigned NMI_W = (N_NM > 1) ? $clog2(N_NM) : 1;
  localparam int unsigned NSI_W = (N_NS > 1) ? $clog2(N_NS) : 1;
  logic [NMI_W-1:0] l_nm, s_nm;
  logic [NSI_W-1:0] l_ns, s_ns;
  logic             nm_l_fire, ns_l_fire, ns_run_cpl;
  assign l_nm = NMI_W'(l_tgt - 1);
  assign s_nm = NMI_W'(s_tgt - 1);
  assign l_ns = NSI_W'(l_tgt - 1 - N_NM);
  assign s_ns = NSI_W'(s_tgt - 1 - N_NM);
  assign nm_l_fire  = (lst == L_NM) && mn_ready[l_nm] && !(sst == S_NM_RD && s_tgt == l_tgt);
  assign ns_l_fire  = (lst == L_NS) && ns_ready[l_ns] && !(sst == S_NS_CMD && s_tgt == l_tgt);
  assign ns_run_cpl = (lst == L_NS_CPL) && ns_cvalid[l_ns] && ns_cpl[l_ns].tag == TAG_RUN;

  assign launch_ready = (lst == L_OC && oc_cmd_ready) || (nm_l_fire && l_word == 2'd0) || ns_run_cpl;
  assign streq_ready  = (sst == S_IDLE);
  assign stat_valid   = (sst == S_OUT);
  assign stat         = s_pkt;

  assign oc_cmd_valid   = (lst == L_OC);
  assign oc_cmd         = lc;
  assign oc_streq_valid = (sst == S_OC);

  // ----------------------------------------------- port multiplexing ----
  always_comb begin
    for (int i = 0; i < N_NM; i++) begin
      automatic logic s_use = (sst == S_NM_RD) && s_tgt == i + 1;
      automatic logic l_use = (lst == L_NM) && l_tgt == i + 1 && !s_use;
      mn_valid[i] = h_mn_valid[i];
      mn_req[i]   = h_mn_req[i];
      h_mn_ready[i] = mn_ready[i] && !s_use && !l_use;
      if (s_use) begin
        mn_valid[i] = 1'b1;
        mn_req[i]   = '{we: 1'b0, addr: CFG_BASE, wdata: '0};
      end else if (l_use) begin
        mn_valid[i] = 1'b1;
        mn_req[i].we    = 1'b1;
        mn_req[i].addr  = CFG_BASE + MEM_AW'(32'(l_word) * 8);
        case (l_word)
          2'd1:    mn_req[i].wdata = MEM_DW'(bbase[BI_W'(lc.in_buf)]);
          2'd2:    mn_req[i].wdata = MEM_DW'(blim[BI_W'(lc.in_buf)]);
          2'd3:    mn_req[i].wdata = MEM_DW'(bbase[BI_W'(lc.out_buf)]);
          default: mn_req[i].wdata = MEM_DW'(lc);
        endcase
      end
      h_mn_rvalid[i] = mn_rvalid[i] && !(sst == S_NM_WAIT && s_tgt == i + 1);
      h_mn_rdata[i]  = mn_rdata[i];
    end
    for (int j = 0; j < N_NS; j++) begin
      automatic logic s_use = (sst == S_NS_CMD) && s_tgt == j + 1 + N_NM;
      automatic logic l_use = (lst == L_NS) && l_tgt == j + 1 + N_NM && !s_use;
      ns_valid[j] = h_ns_valid[j];
      ns_cmd[j]   = h_ns_cmd[j];
      h_ns_ready[j] = ns_ready[j] && !s_use && !l_use;
      if (s_use) begin
        ns_valid[j] = 1'b1;
        ns_cmd[j]   = '{opcode: ACC_STATUS, tag: TAG_STAT, lba: '0, len: '0, data: '0};
      end else if (l_use) begin
        ns_valid[j] = 1'b1;
        ns_cmd[j]   = '{opcode: ACC_RUN, tag: TAG_RUN, lba: LBA_W'(bbase[BI_W'(lc.in_buf)]),
                        len: 16'(blim[BI_W'(lc.in_buf)] - bbase[BI_W'(lc.in_buf)]), data: '0};
      end
      // completions with tag bit 6 set belong to the bridge
      h_ns_cvalid[j] = ns_cvalid[j] && !ns_cpl[j].tag[6];
      h_ns_cpl[j]    = ns_cpl[j];
    end
  end

  // ------------------------------------------------------- sequencing ---
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lst <= L_IDLE; l_word <= '0; lc <= '0; l_tgt <= 0;
      sst <= S_IDLE; s_acc <= '0; s_tgt <= 0; s_pkt <= '0;
      for (int b = 0; b < N_BUF; b++) begin bbase[b] <= '0; blim[b] <= '0; end
      for (int a = 0; a < 1 + N_NM + N_NS; a++) s_outbuf[a] <= '0;
    end else begin
      if (cfg_valid && cfg.kind == CFG_BUFFER) begin
        bbase[BI_W'(cfg.idx)] <= cfg.a;
        blim[BI_W'(cfg.idx)]  <= cfg.b;
      end

      // launch
      case (lst)
        L_IDLE: if (launch_valid) begin
          lc    <= launch;
          l_tgt <= 32'(launch.acc);
          if (32'(launch.acc) < 1 + N_NM + N_NS) s_outbuf[launch.acc] <= launch.out_buf;
          case (level_of(launch.acc))
            0:       lst <= L_OC;
            1:       begin lst <= L_NM; l_word <= 2'd1; end
            default: lst <= L_NS;
          endcase
        end
        L_OC: if (oc_cmd_ready) lst <= L_IDLE;
        L_NM: if (nm_l_fire) begin
          if (l_word == 2'd0) lst <= L_IDLE;
          else l_word <= (l_word == 2'd3) ? 2'd0 : l_word + 1'b1;
        end
        L_NS: if (ns_l_fire) lst <= L_NS_CPL;
        L_NS_CPL: if (ns_run_cpl) lst <= L_IDLE;
        default: lst <= L_IDLE;
      endcase

      // status request
      case (sst)
        S_IDLE: if (streq_valid) begin
          s_acc <= streq_acc;
          s_tgt <= 32'(streq_acc);
          case (level_of(streq_acc))
            0:       sst <= S_OC;
            1:       sst <= S_NM_RD;
            default: sst <= S_NS_CMD;
          endcase
        end
        S_OC: if (oc_streq_ready) sst <= S_OC_WAIT;
        S_OC_WAIT: if (oc_stat_valid) begin s_pkt <= oc_stat; s_pkt.acc <= s_acc; sst <= S_OUT; end
        S_NM_RD: if (mn_ready[s_nm]) sst <= S_NM_WAIT;
        S_NM_WAIT: if (mn_rvalid[s_nm]) begin
          s_pkt.acc      <= s_acc;
          s_pkt.finished <= mn_rdata[s_nm][63];
          s_pkt.new_wait <= TIME_W'(RETRY_WAIT);
          s_pkt.tail     <= ADDR_W'(mn_rdata[s_nm][31:0]);
          sst <= S_OUT;
        end
        S_NS_CMD: if (ns_ready[s_ns]) sst <= S_NS_WAIT;
        S_NS_WAIT: if (ns_cvalid[s_ns] && ns_cpl[s_ns].tag == TAG_STAT) begin
          s_pkt.acc      <= s_acc;
          s_pkt.finished <= ns_cpl[s_ns].data[31];
          s_pkt.new_wait <= TIME_W'(RETRY_WAIT);
          s_pkt.tail     <= bbase[BI_W'(s_outbuf[s_acc])] + ADDR_W'(K);
          sst <= S_OUT;
        end
        S_OUT: if (stat_ready) sst <= S_IDLE;
        default: sst <= S_IDLE;
      endcase
    end
  end
endmodule
