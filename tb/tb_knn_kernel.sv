// tb_knn_kernel: self-checking test of the KNN rerank kernel.
// A reduced kernel (DIM 32, 8 PEs, 2 sort queues, K 4, 256-bit beats) gets a
// random query and several random database sizes, including partial batches
// and fewer vectors than K. The result is compared with distances and a top-K
// list computed in the testbench. The run time is checked against the
// load-bound rate of DIM/EPB beats per vector, and the testbench counts the
// back-pressure cycles that double buffering produces when the stream is fast.
module tb_knn_kernel;
  localparam int ELEM_W = 16, DIM = 32, N_PE = 8, N_SORT = 2, K = 4, BUS_W = 256, IDX_W = 32;
  localparam int DIST_W = 2*ELEM_W + 1 + $clog2(DIM);
  localparam int EPB = BUS_W / ELEM_W, BPV = DIM / EPB;

  logic clk = 0, rst_n = 0;
  logic q_wr_valid = 0; logic [BUS_W-1:0] q_wr_data = '0;
  logic start = 0; logic [IDX_W-1:0] num_vec = '0; logic busy, done;
  logic db_valid = 0, db_ready; logic [BUS_W-1:0] db_data = '0;
  logic [DIST_W-1:0] res_dist [K]; logic [IDX_W-1:0] res_idx [K]; logic res_vld [K];
  int checks = 0, failures = 0, stalls = 0;

  knn_kernel #(.ELEM_W(ELEM_W), .DIM(DIM), .N_PE(N_PE), .N_SORT(N_SORT), .K(K),
               .BUS_W(BUS_W), .IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic signed [ELEM_W-1:0] q [DIM];
  logic signed [ELEM_W-1:0] db [][DIM];
  longint unsigned dref [];

  function automatic longint unsigned distance(int v);
    longint unsigned s = 0;
    for (int d = 0; d < DIM; d++) begin
      longint signed x = longint'(q[d]) - longint'(db[v][d]);
      s += longint'(x * x);
    end
    return s;
  endfunction

  task automatic run(int n, bit gaps);
    int cyc = 0, v = 0, b = 0;
    longint unsigned best [$]; int sel [$];
    db = new[n]; dref = new[n];
    for (int i = 0; i < n; i++) for (int d = 0; d < DIM; d++)
      db[i][d] = ELEM_W'($urandom_range(0, 2000)) - 16'sd1000;
    for (int i = 0; i < n; i++) dref[i] = distance(i);
    @(negedge clk) start = 1; num_vec = n;
    @(negedge clk) start = 0;
    while (!done) begin
      db_valid = (v < n) && (!gaps || $urandom_range(0, 3) != 0);
      for (int e = 0; e < EPB; e++) db_data[e*ELEM_W +: ELEM_W] = (v < n) ? db[v][b*EPB + e] : '0;
      @(posedge clk); cyc++;
      if (db_valid && !db_ready) stalls++;
      if (db_valid && db_ready) begin b++; if (b == BPV) begin b = 0; v++; end end
      @(negedge clk);
    end
    db_valid = 0;
    // reference: K smallest (value, then any index with that value)
    for (int i = 0; i < n; i++) begin
      int pos = best.size();
      for (int k = 0; k < best.size(); k++) if (dref[i] < best[k]) begin pos = k; break; end
      best.insert(pos, dref[i]); sel.insert(pos, i);
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if (k < n) begin
        if (!res_vld[k] || res_dist[k] != DIST_W'(best[k]) || res_idx[k] >= n ||
            dref[res_idx[k]] != best[k]) begin
          failures++;
          $display("n=%0d rank %0d: got %0d idx %0d want %0d", n, k, res_dist[k], res_idx[k], best[k]);
        end
      end else if (res_vld[k]) begin failures++; $display("rank %0d should be empty", k); end
    end
    // timing: a batch period is max(load, DIM+2 compute cycles)
    if (!gaps) begin
      int nb = (n + N_PE - 1) / N_PE;
      int per = (BPV*N_PE > DIM+2) ? BPV*N_PE : DIM+2;
      // first batch load + one batch period per batch + last sort + merge
      checks++;
      if (cyc > BPV*((n < N_PE) ? n : N_PE) + nb*per + 2*N_PE + 4*K + 20) begin
        failures++; $display("n=%0d took %0d cycles", n, cyc);
      end
    end
  endtask

  initial begin
    for (int d = 0; d < DIM; d++) q[d] = ELEM_W'($urandom_range(0, 2000)) - 16'sd1000;
    repeat (3) @(negedge clk); rst_n = 1;
    // load the query, BPV beats
    for (int b = 0; b < BPV; b++) begin
      @(negedge clk) q_wr_valid = 1;
      for (int e = 0; e < EPB; e++) q_wr_data[e*ELEM_W +: ELEM_W] = q[b*EPB + e];
    end
    @(negedge clk) q_wr_valid = 0;
    run(64, 0); run(37, 0); run(3, 0); run(N_PE, 1); run(50, 1); run(1, 0);
    checks++; if (stalls == 0) begin failures++; $display("double-buffer back-pressure never seen"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
