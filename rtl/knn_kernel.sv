// knn_kernel: KNN rerank kernel (distance computation + top-K partial sort).
//
// Given a query vector and a stream of database vectors, returns the K
// database vectors nearest to the query (squared Euclidean distance) with
// their indices. This is the rerank step of content-based image retrieval.
//
// How it works:
//  * The query is loaded beforehand into the main query shift register,
//    one memory beat per `q_wr_valid`.
//  * Database vectors arrive on the `db_*` stream, DIM/EPB beats per vector,
//    vector after vector. Vector j of a batch is written to BRAM bank j, so a
//    batch holds N_PE vectors. Each bank is double buffered: the next batch
//    streams in while the current one is computed.
//  * Compute: for DIM cycles all banks read element d of their vector and the
//    shift register rotates so that query element d reaches every PE in the
//    same cycle. After DIM cycles each PE holds one distance, which is copied
//    into the (double-buffered) distance result buffer.
//  * Sort: N_SORT partial sort queues take the distances of a batch, queue s
//    taking PEs s, s+N_SORT, ..., each queue one candidate every 2 cycles.
//    With the default N_PE = DIM = 128 and N_SORT = 2 sorting a batch takes
//    128 cycles, as long as computing it, so sorting runs concurrently with
//    the next batch's distance computation.
//  * When all `num_vec` vectors are sorted, queues 1..N_SORT-1 are pushed
//    into queue 0, which then holds the overall top K; `done` pulses and
//    res_* hold the result in ascending distance (res_*[0] is the nearest).
//
// From the design: the query shift register shared by n PEs, vectors
// interleaved over BRAMs, double buffering, 128 dimensions, 128 PEs and 2
// partial sort queues, the sort rate, sorting concurrent with computation.
// This implementation's choices: fixed-point elements (ELEM_W), K = 10, the
// 512-bit memory beat, a 2-cycle pipeline bubble between batches, and the
// final merge of the sort queues (the design keeps K per queue and does not
// say how they are combined).
//
// Timing: one batch of N_PE vectors takes DIM+2 compute cycles; loading takes
// N_PE*DIM/EPB beats, so with a 512-bit bus the kernel is load bound, as a
// streaming kernel with no data reuse is expected to be. `done` comes 4*K+
// about 10 cycles after the last batch has been sorted.
module knn_kernel #(
  parameter int unsigned ELEM_W = 16,
  parameter int unsigned DIM    = 128,
  parameter int unsigned N_PE   = 128,
  parameter int unsigned N_SORT = 2,
  parameter int unsigned K      = 10,
  parameter int unsigned BUS_W  = 512,
  parameter int unsigned IDX_W  = 32,
  parameter int unsigned DIST_W = 2*ELEM_W + 1 + $clog2(DIM)
) (
  input  logic              clk,
  input  logic              rst_n,
  // query load
  input  logic              q_wr_valid,
  input  logic [BUS_W-1:0]  q_wr_data,
  // control
  input  logic              start,
  input  logic [IDX_W-1:0]  num_vec,
  output logic              busy,
  output logic              done,
  // database vector stream
  input  logic              db_valid,
  output logic              db_ready,
  input  logic [BUS_W-1:0]  db_data,
  // result, ascending distance
  output logic [DIST_W-1:0] res_dist [K],
  output logic [IDX_W-1:0]  res_idx  [K],
  output logic              res_vld  [K]
);
  localparam int unsigned EPB   = BUS_W / ELEM_W;   // elements per beat
  localparam int unsigned BPV   = DIM / EPB;        // beats per vector
  localparam int unsigned PE_W  = $clog2(N_PE);
  localparam int unsigned CNT_W = $clog2(N_PE + 1);
  localparam int unsigned BB_W  = $clog2(BPV);
  localparam int unsigned D_W   = $clog2(DIM);
  localparam int unsigned SPP   = N_PE / N_SORT;    // pushes per queue per batch
  localparam int unsigned SJ_W  = (SPP > 1) ? $clog2(SPP) : 1;
  localparam int unsigned SETTLE = 2*K + 2;
  localparam int unsigned MS_W  = (N_SORT > 1) ? $clog2(N_SORT) : 1;

  typedef enum logic [2:0] {IDLE, RUN, SETTLE1, MERGE, SETTLE2} state_e;
  state_e state;
  logic [$clog2(SETTLE+1)-1:0] settle_cnt;

  // ------------------------------------------------------------ loader ----
  logic             ld_active;
  logic [PE_W-1:0]  lv;
  logic [BB_W-1:0]  lb;
  logic             fb;
  logic [IDX_W-1:0] loaded, batch_base;
  logic [IDX_W-1:0] nv;          // num_vec, captured at start
  logic             buf_full [2];
  logic [CNT_W-1:0] buf_cnt  [2];
  logic [IDX_W-1:0] buf_base [2];
  logic             db_fire, vec_end, batch_end;

  assign db_ready  = ld_active && !buf_full[fb];
  assign db_fire   = db_valid && db_ready;
  assign vec_end   = db_fire && (lb == BB_W'(BPV-1));
  assign batch_end = vec_end && ((lv == PE_W'(N_PE-1)) || (loaded + 1 == nv));

  // ----------------------------------------------------------- compute ----
  logic             c_active, cb, df;
  logic [D_W-1:0]   cd;
  logic [1:0]       tail_sr;
  logic [CNT_W-1:0] c_cnt;
  logic [IDX_W-1:0] c_base;
  logic             en_d, first_d;
  logic signed [ELEM_W-1:0] q_head, q_head_d;
  logic signed [ELEM_W-1:0] bank_rd [N_PE];
  logic [DIST_W-1:0]        pe_dist [N_PE];
  logic                     c_start;

  // distance result buffer
  logic [DIST_W-1:0] dbuf  [2][N_PE];
  logic              dfull [2];
  logic [CNT_W-1:0]  dcnt  [2];
  logic [IDX_W-1:0]  dbase [2];

  assign c_start = (state == RUN) && !c_active && (tail_sr == 2'b00)
                   && buf_full[cb] && !dfull[df];

  // -------------------------------------------------------------- sort ----
  logic              ds;
  logic [SJ_W-1:0]   sj;
  logic [IDX_W-1:0]  sorted;
  logic              s_ready;
  logic              s_push  [N_SORT];
  logic [DIST_W-1:0] s_dist  [N_SORT];
  logic [IDX_W-1:0]  s_idx   [N_SORT];
  logic [DIST_W-1:0] o_dist  [N_SORT][K];
  logic [IDX_W-1:0]  o_idx   [N_SORT][K];
  logic              o_vld   [N_SORT][K];
  logic              s_ready_v [N_SORT];
  logic              sort_step, sort_last;
  logic [MS_W-1:0]             ms;     // queue being merged into queue 0
  logic [$clog2(K+1)-1:0]      mi;     // entry being merged

  assign s_ready   = s_ready_v[0];
  assign sort_step = (state == RUN) && dfull[ds] && s_ready;
  assign sort_last = sort_step && ((32'(sj) + 1) * N_SORT >= 32'(dcnt[ds]));

  // ------------------------------------------------------- datapath -------
  knn_query_sr #(.ELEM_W(ELEM_W), .DIM(DIM), .EPB(EPB)) u_query (
    .clk, .ld(q_wr_valid && !busy), .ld_data(q_wr_data), .rot(c_active), .head(q_head)
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    knn_vec_bank #(.ELEM_W(ELEM_W), .DIM(DIM), .EPB(EPB)) u_bank (
      .clk,
      .wr_en  (db_fire && (lv == PE_W'(p))),
      .wr_buf (fb),
      .wr_beat(lb),
      .wr_data(db_data),
      .rd_en  (c_active),
      .rd_buf (cb),
      .rd_elem(cd),
      .rd_data(bank_rd[p])
    );
    knn_pe #(.ELEM_W(ELEM_W), .DIM(DIM), .DIST_W(DIST_W)) u_pe (
      .clk, .en(en_d), .first(first_d), .q_elem(q_head_d), .d_elem(bank_rd[p]),
      .acc(pe_dist[p])
    );
  end

  always_comb begin
    for (int s = 0; s < N_SORT; s++) begin
      s_push[s] = 1'b0;
      s_dist[s] = o_dist[ms][mi];
      s_idx[s]  = o_idx[ms][mi];
      if (state == RUN) begin
        s_push[s] = sort_step && ((32'(sj) * N_SORT + s) < 32'(dcnt[ds]));
        s_dist[s] = dbuf[ds][PE_W'(32'(sj) * N_SORT + s)];
        s_idx[s]  = dbase[ds] + IDX_W'(32'(sj) * N_SORT + s);
      end else if (state == MERGE && s == 0) begin
        s_push[s] = s_ready && o_vld[ms][mi];
      end
    end
  end

  for (genvar s = 0; s < N_SORT; s++) begin : g_sort
    knn_topk_sort #(.K(K), .DIST_W(DIST_W), .IDX_W(IDX_W)) u_sort (
      .clk, .rst_n, .clr(start && !busy),
      .push_valid(s_push[s]), .push_ready(s_ready_v[s]),
      .push_dist(s_dist[s]), .push_idx(s_idx[s]),
      .out_dist(o_dist[s]), .out_idx(o_idx[s]), .out_vld(o_vld[s])
    );
  end

  // ------------------------------------------------------- sequencing -----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;  settle_cnt <= '0;
      ld_active <= 1'b0; lv <= '0; lb <= '0; fb <= 1'b0;
      loaded <= '0; batch_base <= '0; nv <= '0;
      c_active <= 1'b0; cb <= 1'b0; df <= 1'b0; cd <= '0; tail_sr <= '0;
      c_cnt <= '0; c_base <= '0; en_d <= 1'b0; first_d <= 1'b0; q_head_d <= '0;
      ds <= 1'b0; sj <= '0; sorted <= '0; ms <= '0; mi <= '0;
      for (int b = 0; b < 2; b++) begin
        buf_full[b] <= 1'b0; buf_cnt[b] <= '0; buf_base[b] <= '0;
        dfull[b] <= 1'b0; dcnt[b] <= '0; dbase[b] <= '0;
      end
    end else begin
      // PE pipeline stage: bank read data and query head arrive together
      en_d     <= c_active;
      first_d  <= c_active && (cd == '0);
      q_head_d <= q_head;

      case (state)
        IDLE: if (start) begin
          state <= RUN;
          ld_active <= (num_vec != '0);
          nv        <= num_vec;
          lv <= '0; lb <= '0; fb <= 1'b0; loaded <= '0; batch_base <= '0;
          cb <= 1'b0; df <= 1'b0; ds <= 1'b0; sj <= '0; sorted <= '0;
          for (int b = 0; b < 2; b++) begin buf_full[b] <= 1'b0; dfull[b] <= 1'b0; end
        end
        RUN: if (sorted == nv) begin
          state <= SETTLE1; settle_cnt <= ($clog2(SETTLE+1))'(SETTLE);
        end
        SETTLE1: begin
          settle_cnt <= settle_cnt - 1'b1;
          if (settle_cnt == '0) begin
            if (N_SORT > 1) begin state <= MERGE; ms <= 1; mi <= '0; end
            else begin state <= SETTLE2; settle_cnt <= ($clog2(SETTLE+1))'(SETTLE); end
          end
        end
        MERGE: if (s_ready) begin
          if (mi == ($clog2(K+1))'(K-1)) begin
            mi <= '0;
            if (ms == MS_W'(N_SORT-1)) begin
              state <= SETTLE2; settle_cnt <= ($clog2(SETTLE+1))'(SETTLE);
            end else ms <= ms + 1'b1;
          end else mi <= mi + 1'b1;
        end
        SETTLE2: begin
          settle_cnt <= settle_cnt - 1'b1;
          if (settle_cnt == '0) state <= IDLE;
        end
        default: state <= IDLE;
      endcase

      // loader
      if (db_fire) begin
        lb <= (lb == BB_W'(BPV-1)) ? '0 : lb + 1'b1;
        if (vec_end) begin
          lv     <= batch_end ? '0 : lv + 1'b1;
          loaded <= loaded + 1'b1;
          if (loaded + 1 == nv) ld_active <= 1'b0;
        end
        if (batch_end) begin
          buf_full[fb] <= 1'b1;
          buf_cnt[fb]  <= CNT_W'(lv) + 1'b1;
          buf_base[fb] <= batch_base;
          batch_base   <= loaded + 1'b1;
          fb           <= !fb;
        end
      end

      // compute
      tail_sr <= {tail_sr[0], 1'b0};
      if (c_start) begin
        c_active <= 1'b1;
        cd       <= '0;
        c_cnt    <= buf_cnt[cb];
        c_base   <= buf_base[cb];
      end else if (c_active) begin
        cd <= cd + 1'b1;
        if (cd == D_W'(DIM-1)) begin
          c_active     <= 1'b0;
          buf_full[cb] <= 1'b0;
          cb           <= !cb;
          tail_sr[0]   <= 1'b1;
        end
      end
      if (tail_sr[1]) begin
        for (int p = 0; p < N_PE; p++) dbuf[df][p] <= pe_dist[p];
        dfull[df] <= 1'b1;
        dcnt[df]  <= c_cnt;
        dbase[df] <= c_base;
        df        <= !df;
      end

      // sort feeder
      if (sort_step) begin
        if (sort_last) begin
          sj        <= '0;
          dfull[ds] <= 1'b0;
          sorted    <= sorted + IDX_W'(dcnt[ds]);
          ds        <= !ds;
        end else sj <= sj + 1'b1;
      end
    end
  end

  assign busy = (state != IDLE);
  assign done = (state == SETTLE2) && (settle_cnt == '0);

  always_comb begin
    for (int i = 0; i < K; i++) begin
      res_dist[i] = o_dist[0][K-1-i];
      res_idx[i]  = o_idx[0][K-1-i];
      res_vld[i]  = o_vld[0][K-1-i];
    end
  end

  initial begin
    assert (BUS_W % ELEM_W == 0 && DIM % (BUS_W / ELEM_W) == 0 && DIM / (BUS_W / ELEM_W) >= 2)
      else $error("DIM must span at least two bus beats");
    assert (N_PE % N_SORT == 0) else $error("N_PE must be a multiple of N_SORT");
  end
endmodule
