// aim_config_filter: configuration filter of an accelerator-interposed
// memory (AIM) module.
//
// Sits on the memory-network side of the AIM module and inspects every
// request from the host memory controller. Requests that fall in the
// module's configuration window (CFG_WORDS 64-bit words at CFG_BASE) are
// accelerator commands and never reach the DIMM:
//   word 0 write : launch the kernel (the written word is the task word)
//   word 1..N-1  : kernel argument registers (read/write)
//   word 0 read  : status {finished, running, 30'b0, tail address[31:0]}
// This is how the GAM launches a near-memory kernel (by writing into the
// configuration filter) and how it polls for completion. All other requests
// are forwarded to the memory access filter, except while the kernel owns
// the DIMM: the host controller has handed control of the DIMM to the
// module, so ordinary requests are held (not ready) until it is handed back.
// Config reads are also held while host DIMM reads are outstanding so that
// read data returns to the host in order.
//
// The filter and its role follow the AIM architecture; the register map, the
// window address and the hold rules are this implementation's choices.
//
// Timing: a config write takes effect at the clock edge that accepts it; a
// config read returns `cfg_rdata` with `cfg_rvalid` one cycle later.
module aim_config_filter
  import reach_pkg::*;
#(
  parameter logic [MEM_AW-1:0] CFG_BASE  = 32'hFFFF_FF00,
  parameter int unsigned       CFG_WORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the memory network
  input  logic              mn_valid,
  output logic              mn_ready,
  input  mem_req_t          mn_req,
  output logic              cfg_rvalid,
  output logic [MEM_DW-1:0] cfg_rdata,
  // to the memory access filter
  output logic              fwd_valid,
  input  logic              fwd_ready,
  output mem_req_t          fwd_req,
  input  logic              host_rd_pending,
  // to / from the programmable fabric
  output logic              acc_start,
  output logic [MEM_DW-1:0] acc_task,
  output logic [MEM_DW-1:0] acc_args [CFG_WORDS],
  input  logic              acc_running,
  input  logic              acc_finished,
  input  logic [MEM_AW-1:0] acc_tail
);
  localparam int unsigned WI_W = $clog2(CFG_WORDS);

  logic            is_cfg;
  logic [WI_W-1:0] widx;
  logic            cfg_fire;

  assign is_cfg   = (mn_req.addr >= CFG_BASE) && (mn_req.addr < CFG_BASE + MEM_AW'(CFG_WORDS * 8));
  assign widx     = WI_W'((mn_req.addr - CFG_BASE) >> 3);
  assign mn_ready = is_cfg ? (mn_req.we || !host_rd_pending) : (fwd_ready && !acc_running);
  assign fwd_valid = mn_valid && !is_cfg && !acc_running;
  assign fwd_req   = mn_req;
  assign cfg_fire  = mn_valid && mn_ready && is_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_start <= 1'b0; acc_task <= '0; cfg_rvalid <= 1'b0; cfg_rdata <= '0;
      for (int i = 0; i < CFG_WORDS; i++) acc_args[i] <= '0;
    end else begin
      acc_start  <= 1'b0;
      cfg_rvalid <= 1'b0;
      if (cfg_fire) begin
        if (mn_req.we) begin
          if (widx == '0) begin
            acc_start <= !acc_running;
            acc_task  <= mn_req.wdata;
          end else acc_args[widx] <= mn_req.wdata;
        end else begin
          cfg_rvalid <= 1'b1;
          cfg_rdata  <= (widx == '0) ? {acc_finished, acc_running, 30'b0, acc_tail}
                                     : acc_args[widx];
        end
      end
    end
  end
endmodule
