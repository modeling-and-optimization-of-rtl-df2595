// aimbus: the inter-DIMM bus connecting the AIM modules of a memory channel.
//
// Lets the accelerator of one module read or write the DIMM of another
// module without going through the host memory controller. Each of the N
// nodes has a request output and input and a response output and input.
// Requests and responses carry a destination node id; for each destination
// a round-robin arbiter picks one of the sources addressing it, and the
// transfer happens when the destination accepts it, so every destination
// receives at most one request and one response per cycle.
//
// The design gives the AIMbus only as a link between modules for
// inter-DIMM communication; the switched organisation, round-robin
// arbitration and single-cycle transfer are this implementation's choices.
module aimbus
  import reach_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_in_valid  [N],
  output logic         req_in_ready  [N],
  input  aimbus_req_t  req_in        [N],
  output logic         req_out_valid [N],
  input  logic         req_out_ready [N],
  output aimbus_req_t  req_out       [N],
  input  logic         rsp_in_valid  [N],
  output logic         rsp_in_ready  [N],
  input  aimbus_resp_t rsp_in        [N],
  output logic         rsp_out_valid [N],
  input  logic         rsp_out_ready [N],
  output aimbus_resp_t rsp_out       [N]
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] rr_req [N];
  logic [IW-1:0] rr_rsp [N];
  logic [IW-1:0] g_req  [N];
  logic [IW-1:0] g_rsp  [N];
  logic          v_req  [N];
  logic          v_rsp  [N];

  always_comb begin
    for (int s = 0; s < N; s++) begin req_in_ready[s] = 1'b0; rsp_in_ready[s] = 1'b0; end
    for (int d = 0; d < N; d++) begin
      v_req[d] = 1'b0; g_req[d] = '0;
      v_rsp[d] = 1'b0; g_rsp[d] = '0;
      for (int k = N - 1; k >= 0; k--) begin
        automatic int s = (int'(rr_req[d]) + k) % N;
        if (req_in_valid[s] && int'(req_in[s].dst) == d) begin v_req[d] = 1'b1; g_req[d] = IW'(s); end
      end
      for (int k = N - 1; k >= 0; k--) begin
        automatic int s = (int'(rr_rsp[d]) + k) % N;
        if (rsp_in_valid[s] && int'(rsp_in[s].dst) == d) begin v_rsp[d] = 1'b1; g_rsp[d] = IW'(s); end
      end
      req_out_valid[d] = v_req[d];
      req_out[d]       = req_in[g_req[d]];
      rsp_out_valid[d] = v_rsp[d];
      rsp_out[d]       = rsp_in[g_rsp[d]];
      if (v_req[d] && req_out_ready[d]) req_in_ready[g_req[d]] = 1'b1;
      if (v_rsp[d] && rsp_out_ready[d]) rsp_in_ready[g_rsp[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N; d++) begin rr_req[d] <= '0; rr_rsp[d] <= '0; end
    end else begin
      for (int d = 0; d < N; d++) begin
        if (v_req[d] && req_out_ready[d]) rr_req[d] <= (int'(g_req[d]) == N - 1) ? '0 : g_req[d] + 1'b1;
        if (v_rsp[d] && rsp_out_ready[d]) rr_rsp[d] <= (int'(g_rsp[d]) == N - 1) ? '0 : g_rsp[d] + 1'b1;
      end
    end
  end
endmodule
