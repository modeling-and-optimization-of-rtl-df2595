// tb_knn_topk_sort: self-checking test of the top-K partial sort queue.
// Pushes random distinct distances (one every two cycles, with random gaps),
// then compares the queue, after 2*K settle cycles, against the K smallest
// values computed by a simple insertion model. Also checks the one-push-per-
// two-cycles rate and a run with fewer than K candidates.
module tb_knn_topk_sort;
  localparam int K = 10, DW = 40, IW = 32;
  logic clk = 0, rst_n = 0, clr = 0, push_valid = 0, push_ready;
  logic [DW-1:0] push_dist; logic [IW-1:0] push_idx;
  logic [DW-1:0] out_dist [K]; logic [IW-1:0] out_idx [K]; logic out_vld [K];
  int checks = 0, failures = 0;

  knn_topk_sort #(.K(K), .DIST_W(DW), .IDX_W(IW)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [DW-1:0] ref_d [$]; logic [IW-1:0] ref_i [$];

  task automatic ref_insert(logic [DW-1:0] d, logic [IW-1:0] i);
    int pos = ref_d.size();
    for (int k = 0; k < ref_d.size(); k++) if (d < ref_d[k]) begin pos = k; break; end
    ref_d.insert(pos, d); ref_i.insert(pos, i);
    if (ref_d.size() > K) begin void'(ref_d.pop_back()); void'(ref_i.pop_back()); end
  endtask

  task automatic run(int n);
    int sent = 0, ready_cycles = 0, cyc = 0;
    ref_d.delete(); ref_i.delete();
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    while (sent < n) begin
      push_valid = ($urandom_range(0, 3) != 0);
      push_dist  = DW'({$urandom_range(0, 65535), 8'(sent)});   // distinct values
      push_idx   = IW'(1000 + sent);
      @(posedge clk); cyc++;
      if (push_ready) ready_cycles++;
      if (push_valid && push_ready) begin ref_insert(push_dist, push_idx); sent++; end
      @(negedge clk);
    end
    push_valid = 0;
    checks++; if (ready_cycles * 2 > cyc + 1) begin failures++; $display("rate too high"); end
    repeat (2*K + 2) @(negedge clk);
    for (int k = 0; k < K; k++) begin
      checks++;
      if (k < ref_d.size()) begin
        if (!out_vld[K-1-k] || out_dist[K-1-k] != ref_d[k] || out_idx[K-1-k] != ref_i[k]) begin
          failures++; $display("n=%0d slot %0d: got %0d/%0d want %0d/%0d", n, k,
                               out_dist[K-1-k], out_idx[K-1-k], ref_d[k], ref_i[k]);
        end
      end else if (out_vld[K-1-k]) begin failures++; $display("slot %0d should be empty", k); end
    end
  endtask

  initial begin
    push_dist = '0; push_idx = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(200); run(5); run(K); run(37);
    for (int r = 0; r < 10; r++) run($urandom_range(1, 120));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
