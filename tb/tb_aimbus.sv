// tb_aimbus: every node sends random requests and responses to random
// destinations under random back-pressure. Checks that each item reaches the
// destination it names, unchanged, in per-source order, that nothing is lost,
// and that the round-robin arbiter serves every contender (no source waits
// more than N grants of its destination).
module tb_aimbus;
  import reach_pkg::*;
  localparam int N = 4, PER_SRC = 60;
  logic clk = 0, rst_n = 0;
  logic req_in_valid [N], req_in_ready [N], req_out_valid [N], req_out_ready [N];
  aimbus_req_t req_in [N], req_out [N];
  logic rsp_in_valid [N], rsp_in_ready [N], rsp_out_valid [N], rsp_out_ready [N];
  aimbus_resp_t rsp_in [N], rsp_out [N];
  int checks = 0, failures = 0;
  aimbus dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int sent_q [N], sent_r [N], got_q = 0, got_r = 0, next_q [N][N], next_r [N][N];
  int wait_q [N]; int max_wait = 0; bit acc_q [N], acc_r [N];
  // payload: wdata = {src, seq}, rdata = {src, seq}
  task automatic drive();
    for (int s = 0; s < N; s++) begin
      if (!req_in_valid[s] && sent_q[s] < PER_SRC && $urandom % 2) begin
        req_in_valid[s] = 1; req_in[s].dst = NODE_W'((s == 0) ? 1 : $urandom % N); req_in[s].src = NODE_W'(s);
        req_in[s].req = '{we: 1'($urandom), addr: $urandom, wdata: {32'(s), 32'(sent_q[s])}};
      end
      if (!rsp_in_valid[s] && sent_r[s] < PER_SRC && $urandom % 2) begin
        rsp_in_valid[s] = 1; rsp_in[s].dst = NODE_W'($urandom % N); rsp_in[s].rdata = {32'(s), 32'(sent_r[s])};
      end
      req_out_ready[s] = ($urandom % 4) != 0; rsp_out_ready[s] = ($urandom % 4) != 0;
    end
  endtask
  initial begin
    for (int s = 0; s < N; s++) begin
      req_in_valid[s] = 0; rsp_in_valid[s] = 0; req_in[s] = '0; rsp_in[s] = '0; sent_q[s] = 0; sent_r[s] = 0; wait_q[s] = 0;
      for (int d = 0; d < N; d++) begin next_q[s][d] = 0; next_r[s][d] = 0; end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    while (got_q < N * PER_SRC || got_r < N * PER_SRC) begin
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        if (acc_q[s]) begin req_in_valid[s] = 0; sent_q[s]++; end
        if (acc_r[s]) begin rsp_in_valid[s] = 0; sent_r[s]++; end
      end
      drive();
      #1;
      for (int d = 0; d < N; d++) begin
        if (req_out_valid[d] && req_out_ready[d]) begin
          automatic int s = int'(req_out[d].src);
          checks++;
          if (int'(req_out[d].req.wdata[63:32]) != s || int'(req_out[d].dst) != d || !req_in_ready[s]) begin
            failures++; $display("FAIL: request to %0d from %0d", d, s);
          end
          got_q++;
          for (int o = 0; o < N; o++)
            if (o != s && req_in_valid[o] && int'(req_in[o].dst) == d) begin
              wait_q[o]++; if (wait_q[o] > max_wait) max_wait = wait_q[o];
            end
          wait_q[s] = 0;
        end
        if (rsp_out_valid[d] && rsp_out_ready[d]) begin
          automatic int s = int'(rsp_out[d].rdata[63:32]);
          checks++;
          if (int'(rsp_out[d].dst) != d || !rsp_in_ready[s]) begin failures++; $display("FAIL: response to %0d", d); end
          got_r++;
        end
      end
      for (int s = 0; s < N; s++) begin
        acc_q[s] = req_in_valid[s] && req_in_ready[s]; acc_r[s] = rsp_in_valid[s] && rsp_in_ready[s];
      end
    end
    checks++; if (max_wait > N - 1) begin failures++; $display("FAIL: a source waited %0d grants", max_wait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
