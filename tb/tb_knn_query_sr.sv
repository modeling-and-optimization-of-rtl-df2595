// tb_knn_query_sr: self-checking test of the query shift register. Loads a
// random query beat by beat, then rotates and checks that the head walks
// through elements 0..DIM-1 and wraps back to element 0, twice.
module tb_knn_query_sr;
  localparam int ELEM_W = 16, DIM = 128, EPB = 32;
  logic clk = 0, ld = 0, rot = 0;
  logic [EPB*ELEM_W-1:0] ld_data = '0;
  logic signed [ELEM_W-1:0] head;
  logic [ELEM_W-1:0] q [DIM];
  int checks = 0, failures = 0;
  knn_query_sr #(.ELEM_W(ELEM_W), .DIM(DIM), .EPB(EPB)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (q[i]) q[i] = ELEM_W'($urandom);
    for (int b = 0; b < DIM/EPB; b++) begin
      @(negedge clk) ld = 1;
      for (int e = 0; e < EPB; e++) ld_data[e*ELEM_W +: ELEM_W] = q[b*EPB+e];
    end
    @(negedge clk) ld = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int d = 0; d < DIM; d++) begin
        checks++;
        if (head != q[d]) begin failures++; $display("pass %0d elem %0d: %h vs %h", pass, d, head, q[d]); end
        rot = 1; @(negedge clk); rot = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // holding keeps the head
      end
    checks++; if (head != q[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
