// reach_pkg: types and constants shared by the ReACH compute hierarchy.
//
// The hierarchy has one on-chip accelerator, near-memory accelerators (one per
// DIMM, inside an accelerator-interposed memory module) and near-storage
// accelerators (one per SSD), all coordinated by a global accelerator manager
// (GAM). The accelerator numbering (OnChip, NM0.., NS0..) and the fields of the
// GAM command and status packets follow the GAM micro-architecture of the
// design; every field width below is this implementation's own choice.
package reach_pkg;

  // ---------------------------------------------------------------- GAM ----
  localparam int unsigned ACC_W    = 4;   // accelerator id
  localparam int unsigned THREAD_W = 4;   // software thread id
  localparam int unsigned TASK_W   = 6;   // task id
  localparam int unsigned BUF_W    = 4;   // buffer id (buffer table index)
  localparam int unsigned ADDR_W   = 40;  // byte address
  localparam int unsigned TIME_W   = 24;  // wait time in cycles

  // ACC command packet: ACC ID, SW thread / task ID, input buffer, output
  // buffer, dependency (the task whose output this task consumes).
  typedef struct packed {
    logic [ACC_W-1:0]    acc;
    logic [THREAD_W-1:0] thread;
    logic [TASK_W-1:0]   task_id;
    logic [BUF_W-1:0]    in_buf;
    logic [BUF_W-1:0]    out_buf;
    logic                dep_valid;
    logic [TASK_W-1:0]   dep_task;
  } acc_cmd_t;

  // ACC status packet: ACC ID, finished, new wait time, tail address of the
  // output stream written by the task.
  typedef struct packed {
    logic [ACC_W-1:0]  acc;
    logic              finished;
    logic [TIME_W-1:0] new_wait;
    logic [ADDR_W-1:0] tail;
  } acc_status_t;

  // DMA request issued by the GAM to forward a producer's output to the
  // input buffer of a dependent task.
  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [ADDR_W-1:0] len;
  } dma_req_t;

  // Host (driver) configuration writes into the GAM.
  typedef enum logic [1:0] {
    CFG_EST_TIME = 2'd0,  // accelerator table: estimated task time
    CFG_BUFFER   = 2'd1,  // buffer table entry
    CFG_TLB      = 2'd2,  // TLB entry
    CFG_MC_MAP   = 2'd3   // memory-controller interleave registers
  } cfg_kind_e;

  typedef struct packed {
    cfg_kind_e         kind;
    logic [ACC_W-1:0]  idx;    // accelerator / buffer / TLB entry / MC index
    logic [ADDR_W-1:0] a;      // est time, base, virtual page, mode+tile
    logic [ADDR_W-1:0] b;      // -, limit, physical page, -
  } gam_cfg_t;

  // Interrupt to the host when the last outstanding task of a thread ends.
  typedef struct packed {
    logic [THREAD_W-1:0] thread;
  } gam_irq_t;

  // ------------------------------------------------------ memory channel ----
  localparam int unsigned MEM_DW  = 64;   // memory-channel data word
  localparam int unsigned MEM_AW  = 32;   // DIMM-local byte address

  typedef struct packed {
    logic              we;
    logic [MEM_AW-1:0] addr;
    logic [MEM_DW-1:0] wdata;
  } mem_req_t;

  // Source of a request reaching a DIMM, used to route the response.
  typedef enum logic [1:0] {
    SRC_HOST   = 2'd0,
    SRC_LOCAL  = 2'd1,
    SRC_REMOTE = 2'd2
  } mem_src_e;

  // AIMbus request between AIM modules.
  localparam int unsigned NODE_W = 3;
  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [NODE_W-1:0] src;
    mem_req_t          req;
  } aimbus_req_t;

  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [MEM_DW-1:0] rdata;
  } aimbus_resp_t;

  // ------------------------------------------------------ storage (NVMe) ----
  localparam int unsigned NVME_TAG_W = 8;
  localparam int unsigned LBA_W      = 32;
  localparam int unsigned NVME_DW    = 512;   // one data beat

  // Standard NVMe I/O opcodes used by pass-through traffic, and the
  // vendor-specific range (0xC0-0xFF) used for accelerator commands.
  localparam logic [7:0] NVME_WRITE   = 8'h01;
  localparam logic [7:0] NVME_READ    = 8'h02;
  localparam logic [7:0] ACC_WR_QUERY = 8'hC0;  // one beat of the query vector
  localparam logic [7:0] ACC_RUN      = 8'hC1;  // start: lba = first beat, len = vectors
  localparam logic [7:0] ACC_STATUS   = 8'hC2;  // finished flag + result count
  localparam logic [7:0] ACC_RESULT   = 8'hC3;  // lba = result slot

  typedef struct packed {
    logic [7:0]            opcode;
    logic [NVME_TAG_W-1:0] tag;
    logic [LBA_W-1:0]      lba;    // beat address on the SSD
    logic [15:0]           len;
    logic [NVME_DW-1:0]    data;
  } nvme_cmd_t;

  typedef struct packed {
    logic [NVME_TAG_W-1:0] tag;
    logic [7:0]            status;
    logic [NVME_DW-1:0]    data;
  } nvme_cpl_t;

endpackage
