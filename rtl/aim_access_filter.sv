// aim_access_filter: memory access filter of an AIM module.
//
// Arbitrates the DIMM between three requesters and routes every read
// response back to the one that asked:
//   host   - requests forwarded by the configuration filter; responses go
//            back on the memory channel;
//   local  - the module's own accelerator; a request marked `remote` is sent
//            over the AIMbus to another module's DIMM instead, and the reply
//            coming back over the AIMbus is delivered to the accelerator;
//   remote - requests from other modules arriving over the AIMbus; responses
//            return over the AIMbus to the requesting node.
// The DIMM answers reads in order, so a FIFO of (source, node) tags decides
// where each response goes. Remote responses wait in a FIFO for the AIMbus.
//
// The three destinations of memory responses follow the AIM architecture;
// the fixed priority (remote > local > host), the tag FIFO, the in-order
// DIMM assumption and the buffering are this implementation's choices.
//
// Timing: requests pass straight through (combinational valid/ready); a
// response is routed in the cycle the DIMM returns it.
module aim_access_filter
  import reach_pkg::*;
#(
  parameter int unsigned       TAG_DEPTH = 8,
  parameter logic [NODE_W-1:0] NODE_ID   = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // host (through the configuration filter)
  input  logic              host_valid,
  output logic              host_ready,
  input  mem_req_t          host_req,
  output logic              host_rvalid,
  output logic [MEM_DW-1:0] host_rdata,
  output logic              host_rd_pending,
  // local accelerator
  input  logic              acc_valid,
  output logic              acc_ready,
  input  mem_req_t          acc_req,
  input  logic              acc_remote,
  input  logic [NODE_W-1:0] acc_node,
  output logic              acc_rvalid,
  output logic [MEM_DW-1:0] acc_rdata,
  // AIMbus
  input  logic              bus_in_valid,
  output logic              bus_in_ready,
  input  aimbus_req_t       bus_in_req,
  output logic              bus_out_valid,
  input  logic              bus_out_ready,
  output aimbus_req_t       bus_out_req,
  input  logic              bus_in_rvalid,
  output logic              bus_in_rready,
  input  aimbus_resp_t      bus_in_resp,
  output logic              bus_out_rvalid,
  input  logic              bus_out_rready,
  output aimbus_resp_t      bus_out_resp,
  // DIMM
  output logic              dimm_valid,
  input  logic              dimm_ready,
  output mem_req_t          dimm_req,
  input  logic              dimm_rvalid,
  input  logic [MEM_DW-1:0] dimm_rdata,
  output logic              idle
);
  typedef struct packed {
    mem_src_e          src;
    logic [NODE_W-1:0] node;
  } tag_t;

  tag_t  tag_head, tag_din;
  logic  tag_empty, tag_full, tag_push;
  logic  sel_remote, sel_local, sel_host, fire;
  logic  acc_local;
  logic [$clog2(TAG_DEPTH+1)-1:0] host_rds;

  aimbus_resp_t rq_head;
  logic         rq_empty, rq_full;

  assign acc_local  = acc_valid && !acc_remote;
  // fixed priority, and a read needs a free tag slot
  assign sel_remote = bus_in_valid;
  assign sel_local  = !sel_remote && acc_local;
  assign sel_host   = !sel_remote && !acc_local && host_valid;

  always_comb begin
    dimm_req = host_req;
    tag_din  = '{src: SRC_HOST, node: NODE_ID};
    if (sel_remote) begin
      dimm_req = bus_in_req.req;
      tag_din  = '{src: SRC_REMOTE, node: bus_in_req.src};
    end else if (sel_local) begin
      dimm_req = acc_req;
      tag_din  = '{src: SRC_LOCAL, node: NODE_ID};
    end
  end

  assign dimm_valid   = (sel_remote || sel_local || sel_host) && (dimm_req.we || !tag_full)
                        && !(sel_remote && rq_full);
  assign fire         = dimm_valid && dimm_ready;
  assign tag_push     = fire && !dimm_req.we;
  assign bus_in_ready = sel_remote && fire;
  assign host_ready   = sel_host && fire;

  // accelerator: local requests go to the DIMM, remote ones to the AIMbus
  assign bus_out_valid = acc_valid && acc_remote;
  assign bus_out_req   = '{dst: acc_node, src: NODE_ID, req: acc_req};
  assign acc_ready     = acc_remote ? bus_out_ready : (sel_local && fire);

  reach_fifo #(.T(tag_t), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n, .push(tag_push), .din(tag_din),
    .pop(dimm_rvalid), .head(tag_head), .empty(tag_empty), .full(tag_full)
  );

  // response routing
  logic resp_local, resp_remote;
  assign host_rvalid  = dimm_rvalid && tag_head.src == SRC_HOST;
  assign host_rdata   = dimm_rdata;
  assign resp_local   = dimm_rvalid && tag_head.src == SRC_LOCAL;
  assign resp_remote  = dimm_rvalid && tag_head.src == SRC_REMOTE;
  assign acc_rvalid   = resp_local || bus_in_rvalid;
  assign acc_rdata    = resp_local ? dimm_rdata : bus_in_resp.rdata;
  assign bus_in_rready = !resp_local;

  reach_fifo #(.T(aimbus_resp_t), .DEPTH(TAG_DEPTH)) u_rq (
    .clk, .rst_n, .push(resp_remote), .din('{dst: tag_head.node, rdata: dimm_rdata}),
    .pop(bus_out_rvalid && bus_out_rready), .head(rq_head), .empty(rq_empty), .full(rq_full)
  );
  assign bus_out_rvalid = !rq_empty;
  assign bus_out_resp   = rq_head;

  // host reads in flight (the configuration filter orders its reads after them)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rds <= '0;
    else host_rds <= host_rds + ($bits(host_rds))'(tag_push && sel_host)
                              - ($bits(host_rds))'(host_rvalid);
  end
  assign host_rd_pending = (host_rds != '0);
  assign idle = tag_empty && rq_empty;

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n) dimm_rvalid |-> !tag_empty);
endmodule
