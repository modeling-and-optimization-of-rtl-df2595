// tb_knn_pe: self-checking test of the distance PE. Feeds random signed
// element pairs for several vectors (with idle cycles in between) and compares
// the accumulated squared distance with a sum computed in the testbench,
// including the extreme values of the element range.
module tb_knn_pe;
  localparam int ELEM_W = 16, DIM = 128, DIST_W = 2*ELEM_W + 1 + $clog2(DIM);
  logic clk = 0, en = 0, first = 0;
  logic signed [ELEM_W-1:0] q_elem = '0, d_elem = '0;
  logic [DIST_W-1:0] acc;
  int checks = 0, failures = 0;
  knn_pe #(.ELEM_W(ELEM_W), .DIM(DIM)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int v = 0; v < 20; v++) begin
      longint unsigned sum;
      sum = 0;
      for (int d = 0; d < DIM; d++) begin
        @(negedge clk);
        en = 1; first = (d == 0);
        if (v == 0) begin q_elem = 16'sh7fff; d_elem = 16'sh8000; end
        else begin q_elem = ELEM_W'($urandom); d_elem = ELEM_W'($urandom); end
        sum += longint'((longint'(q_elem) - longint'(d_elem)) * (longint'(q_elem) - longint'(d_elem)));
        if ($urandom_range(0, 7) == 0) begin @(negedge clk); en = 0; end
      end
      @(negedge clk); en = 0;
      checks++;
      if (acc != DIST_W'(sum)) begin failures++; $display("v%0d got %0d want %0d", v, acc, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
