// tb_knn_vec_bank: self-checking test of one double-buffered BRAM bank.
// Writes a different random vector into each buffer, reads every element of
// both buffers with the one-cycle read latency, and checks that writing one
// buffer leaves the other intact.
module tb_knn_vec_bank;
  localparam int ELEM_W = 16, DIM = 128, EPB = 32, BPV = DIM/EPB;
  logic clk = 0, wr_en = 0, wr_buf = 0, rd_en = 0, rd_buf = 0;
  logic [$clog2(BPV)-1:0] wr_beat = '0;
  logic [EPB*ELEM_W-1:0] wr_data = '0;
  logic [$clog2(DIM)-1:0] rd_elem = '0;
  logic signed [ELEM_W-1:0] rd_data;
  logic [ELEM_W-1:0] v [2][DIM];
  int checks = 0, failures = 0;
  knn_vec_bank #(.ELEM_W(ELEM_W), .DIM(DIM), .EPB(EPB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic write_buf(int b);
    foreach (v[b][i]) v[b][i] = ELEM_W'($urandom);
    for (int k = 0; k < BPV; k++) begin
      @(negedge clk) wr_en = 1; wr_buf = b[0]; wr_beat = k[$clog2(BPV)-1:0];
      for (int e = 0; e < EPB; e++) wr_data[e*ELEM_W +: ELEM_W] = v[b][k*EPB+e];
    end
    @(negedge clk) wr_en = 0;
  endtask
  task automatic check_buf(int b);
    for (int d = 0; d < DIM; d++) begin
      @(negedge clk) rd_en = 1; rd_buf = b[0]; rd_elem = d[$clog2(DIM)-1:0];
      @(negedge clk) rd_en = 0;
      checks++;
      if (rd_data != v[b][d]) begin failures++; $display("buf %0d elem %0d: %h vs %h", b, d, rd_data, v[b][d]); end
    end
  endtask
  initial begin
    write_buf(0); write_buf(1); check_buf(0); check_buf(1);
    write_buf(0); check_buf(1); check_buf(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
