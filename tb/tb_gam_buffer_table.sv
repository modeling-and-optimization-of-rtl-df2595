// tb_gam_buffer_table: writes random base/limit pairs into the GAM buffer
// table and reads them back through both read ports, against a model.
module tb_gam_buffer_table;
  import reach_pkg::*;
  localparam int N_BUF = 16;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0] wr_id = '0, rd_id_a = '0, rd_id_b = '0;
  logic [ADDR_W-1:0] wr_base = '0, wr_limit = '0, base_a, limit_a, base_b, limit_b;
  logic [ADDR_W-1:0] mb [N_BUF], ml [N_BUF];
  int checks = 0, failures = 0;
  gam_buffer_table dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < N_BUF; i++) begin mb[i] = '0; ml[i] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N_BUF; i++) begin
      @(negedge clk); rd_id_a = 4'(i); rd_id_b = 4'(i);
      #1 checks++; if (base_a != 0 || limit_b != 0) begin failures++; $display("FAIL: reset entry %0d", i); end
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en = ($urandom % 2) == 0; wr_id = 4'($urandom); wr_base = {8'($urandom), 32'($urandom)};
      wr_limit = wr_base + 40'($urandom % 4096);
      rd_id_a = 4'($urandom); rd_id_b = 4'($urandom);
      #1 checks++;
      if (base_a != mb[rd_id_a] || limit_a != ml[rd_id_a] || base_b != mb[rd_id_b] || limit_b != ml[rd_id_b]) begin
        failures++; $display("FAIL: read a=%0d b=%0d", rd_id_a, rd_id_b);
      end
      @(posedge clk); if (wr_en) begin mb[wr_id] = wr_base; ml[wr_id] = wr_limit; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
