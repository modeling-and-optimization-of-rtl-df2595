// aim_module: accelerator-interposed memory (AIM) module, the near-memory
// accelerator of the ReACH hierarchy.
//
// One AIM module sits between the memory network and each DIMM, so existing
// memory controllers, buses and DIMMs stay unchanged. It holds a
// configuration filter (accelerator commands arriving on the memory
// channel), a memory access filter (routes DIMM responses to the local
// accelerator, to a remote accelerator over the AIMbus or to the host) and
// the ports of the programmable fabric, where the near-memory kernel runs.
//
// DIMM ownership: normally the host memory controller owns the DIMM. A launch
// (write to configuration word 0) hands the DIMM to the accelerator; host
// requests are then held. When the fabric reports `fab_done`, the module
// waits for its own reads to drain, issues a precharge-all to the DIMM
// (closed-row policy, so the host controller can assume every bank is
// precharged when it gets the DIMM back), sets the finished flag and the
// tail address that a status poll reads, and returns the DIMM to the host.
//
// From the design: the module placement, the three filters/interfaces, the
// hand-over of DIMM control during a kernel and the closed-row policy at
// hand-back. This implementation's choices: the register map (see
// aim_config_filter), the request/response form of the DIMM port (a real
// DIMM takes DDR4 commands; here a precharge-all strobe stands for the
// closing of rows) and the drain-then-precharge sequence.
//
// Timing: `dimm_pre_all` is a one-cycle strobe; the DIMM must answer reads in
// order, at least one cycle after accepting them.
module aim_module
  import reach_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID   = '0,
  parameter logic [MEM_AW-1:0] CFG_BASE  = 32'hFFFF_FF00,
  parameter int unsigned       CFG_WORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory network (host memory controller)
  input  logic              mn_valid,
  output logic              mn_ready,
  input  mem_req_t          mn_req,
  output logic              mn_rvalid,
  output logic [MEM_DW-1:0] mn_rdata,
  // DIMM
  output logic              dimm_valid,
  input  logic              dimm_ready,
  output mem_req_t          dimm_req,
  input  logic              dimm_rvalid,
  input  logic [MEM_DW-1:0] dimm_rdata,
  output logic              dimm_pre_all,
  // AIMbus
  output logic              bus_req_out_valid,
  input  logic              bus_req_out_ready,
  output aimbus_req_t       bus_req_out,
  input  logic              bus_req_in_valid,
  output logic              bus_req_in_ready,
  input  aimbus_req_t       bus_req_in,
  output logic              bus_rsp_out_valid,
  input  logic              bus_rsp_out_ready,
  output aimbus_resp_t      bus_rsp_out,
  input  logic              bus_rsp_in_valid,
  output logic              bus_rsp_in_ready,
  input  aimbus_resp_t      bus_rsp_in,
  // programmable fabric
  output logic              fab_start,
  output logic [MEM_DW-1:0] fab_task,
  output logic [MEM_DW-1:0] fab_args [CFG_WORDS],
  input  logic              fab_mem_valid,
  output logic              fab_mem_ready,
  input  mem_req_t          fab_mem_req,
  input  logic              fab_mem_remote,
  input  logic [NODE_W-1:0] fab_mem_node,
  output logic              fab_mem_rvalid,
  output logic [MEM_DW-1:0] fab_mem_rdata,
  input  logic              fab_done,
  input  logic [MEM_AW-1:0] fab_tail,
  output logic              acc_owns_dimm
);
  typedef enum logic [1:0] {OWN_HOST, OWN_ACC, DRAIN, PRECHARGE} own_e;
  own_e              own;
  logic              finished;
  logic [MEM_AW-1:0] tail;

  logic              fwd_valid, fwd_ready, host_rd_pending, host_rvalid, cfg_rvalid, af_idle;
  mem_req_t          fwd_req;
  logic [MEM_DW-1:0] host_rdata, cfg_rdata;

  assign acc_owns_dimm = (own != OWN_HOST);

  aim_config_filter #(.CFG_BASE(CFG_BASE), .CFG_WORDS(CFG_WORDS)) u_cfg (
    .clk, .rst_n,
    .mn_valid, .mn_ready, .mn_req, .cfg_rvalid, .cfg_rdata,
    .fwd_valid, .fwd_ready, .fwd_req, .host_rd_pending,
    .acc_start(fab_start), .acc_task(fab_task), .acc_args(fab_args),
    .acc_running(acc_owns_dimm), .acc_finished(finished), .acc_tail(tail)
  );

  logic af_acc_ready;
  assign fab_mem_ready = af_acc_ready && own == OWN_ACC;

  aim_access_filter #(.NODE_ID(NODE_ID)) u_acc (
    .clk, .rst_n,
    .host_valid(fwd_valid), .host_ready(fwd_ready), .host_req(fwd_req),
    .host_rvalid, .host_rdata, .host_rd_pending,
    .acc_valid(fab_mem_valid && own == OWN_ACC), .acc_ready(af_acc_ready), .acc_req(fab_mem_req),
    .acc_remote(fab_mem_remote), .acc_node(fab_mem_node),
    .acc_rvalid(fab_mem_rvalid), .acc_rdata(fab_mem_rdata),
    .bus_in_valid(bus_req_in_valid), .bus_in_ready(bus_req_in_ready), .bus_in_req(bus_req_in),
    .bus_out_valid(bus_req_out_valid), .bus_out_ready(bus_req_out_ready), .bus_out_req(bus_req_out),
    .bus_in_rvalid(bus_rsp_in_valid), .bus_in_rready(bus_rsp_in_ready), .bus_in_resp(bus_rsp_in),
    .bus_out_rvalid(bus_rsp_out_valid), .bus_out_rready(bus_rsp_out_ready), .bus_out_resp(bus_rsp_out),
    .dimm_valid, .dimm_ready, .dimm_req, .dimm_rvalid, .dimm_rdata, .idle(af_idle)
  );

  assign mn_rvalid = host_rvalid || cfg_rvalid;
  assign mn_rdata  = cfg_rvalid ? cfg_rdata : host_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own <= OWN_HOST; finished <= 1'b0; tail <= '0; dimm_pre_all <= 1'b0;
    end else begin
      dimm_pre_all <= 1'b0;
      case (own)
        OWN_HOST:  if (fab_start) begin own <= OWN_ACC; finished <= 1'b0; end
        OWN_ACC:   if (fab_done) begin own <= DRAIN; tail <= fab_tail; end
        DRAIN:     if (af_idle) begin own <= PRECHARGE; dimm_pre_all <= 1'b1; end
        PRECHARGE: begin own <= OWN_HOST; finished <= 1'b1; end
        default:   own <= OWN_HOST;
      endcase
    end
  end

  a_one_response: assert property (@(posedge clk) disable iff (!rst_n) !(host_rvalid && cfg_rvalid));
endmodule
