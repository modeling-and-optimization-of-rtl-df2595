// tb_mc_interleave: checks the memory-controller address map in cache-line
// interleave mode (after reset) and after switching to tile mode with
// several tile sizes: DIMM index, DIMM-local address, and that the mapping
// is one-to-one over a window of addresses.
module tb_mc_interleave;
  import reach_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, cfg_valid = 0, cfg_tile_mode = 0; logic [4:0] cfg_tile_log2 = '0;
  logic [ADDR_W-1:0] addr = '0; logic [1:0] dimm; logic [MEM_AW-1:0] dimm_addr; logic tile_mode;
  int checks = 0, failures = 0;
  mc_interleave dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic sweep(int g);
    bit seen [logic [33:0]];
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); addr = (n < 64) ? 40'(n * 8) : 40'($urandom % (1 << 20)); #1;
      checks++;
      if (int'(dimm) != int'((addr >> g) % N) ||
          dimm_addr != MEM_AW'((((addr >> g) / N) << g) | (addr % (40'd1 << g)))) begin
        failures++; $display("FAIL: g=%0d addr=%h dimm=%0d da=%h", g, addr, dimm, dimm_addr);
      end
      if (n < 64) begin
        checks++;
        if (seen.exists({dimm, dimm_addr})) begin failures++; $display("FAIL: alias at %h", addr); end
        seen[{dimm, dimm_addr}] = 1;
      end
    end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    checks++; if (tile_mode) failures++;
    sweep(6);
    for (int t = 0; t < 3; t++) begin
      automatic int g = 8 + 4 * t;
      @(negedge clk); cfg_valid = 1; cfg_tile_mode = 1; cfg_tile_log2 = 5'(g);
      @(negedge clk); cfg_valid = 0; cfg_tile_mode = 0; cfg_tile_log2 = '0;
      checks++; if (!tile_mode) begin failures++; $display("FAIL: tile mode not set"); end
      sweep(g);
    end
    @(negedge clk); cfg_valid = 1; cfg_tile_mode = 0; @(negedge clk); cfg_valid = 0;
    checks++; if (tile_mode) failures++;
    sweep(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
