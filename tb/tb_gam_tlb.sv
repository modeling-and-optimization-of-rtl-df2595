// tb_gam_tlb: fills TLB entries with random page pairs and checks that both
// lookup ports translate hits (page swapped, offset kept) and pass misses
// through unchanged with the hit flag low.
module tb_gam_tlb;
  import reach_pkg::*;
  localparam int ENTRIES = 8, PB = 12;
  logic clk = 0, rst_n = 0, fill = 0;
  logic [2:0] fill_idx = '0;
  logic [ADDR_W-1:0] fill_va = '0, fill_pa = '0, va_a = '0, va_b = '0, pa_a, pa_b;
  logic hit_a, hit_b;
  logic [ADDR_W-1:0] mva [ENTRIES], mpa [ENTRIES]; bit mv [ENTRIES];
  int checks = 0, failures = 0, hits = 0;
  gam_tlb dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic void model(logic [ADDR_W-1:0] va, output logic [ADDR_W-1:0] pa, output bit hit);
    pa = va; hit = 0;
    for (int i = 0; i < ENTRIES; i++)
      if (mv[i] && mva[i][ADDR_W-1:PB] == va[ADDR_W-1:PB]) begin hit = 1; pa = {mpa[i][ADDR_W-1:PB], va[PB-1:0]}; end
  endfunction
  initial begin
    logic [ADDR_W-1:0] epa; bit eh;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      fill = (n < 40) && ($urandom % 3 == 0);
      fill_idx = 3'($urandom);
      fill_va = {28'($urandom % 16), 12'h0}; fill_pa = {8'($urandom), 20'($urandom), 12'h0};
      va_a = {28'($urandom % 24), 12'($urandom)}; va_b = {28'($urandom % 24), 12'($urandom)};
      #1;
      model(va_a, epa, eh); checks++;
      if (pa_a != epa || hit_a != eh) begin failures++; $display("FAIL: port a va=%h pa=%h exp %h", va_a, pa_a, epa); end
      hits += eh;
      model(va_b, epa, eh); checks++;
      if (pa_b != epa || hit_b != eh) begin failures++; $display("FAIL: port b va=%h", va_b); end
      @(posedge clk);
      if (fill) begin
        // a page already mapped by another entry is replaced there too
        mv[fill_idx] = 1; mva[fill_idx] = fill_va; mpa[fill_idx] = fill_pa;
      end
    end
    checks++; if (hits == 0) begin failures++; $display("FAIL: no TLB hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
