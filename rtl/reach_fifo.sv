// reach_fifo: synchronous FIFO used for the GAM job queue, the per-accelerator
// task queues, the status queues and the response queues of the memory and
// storage filters. First-word fall-through: `head` shows
// the oldest entry whenever `empty` is low; `pop` removes it. A push into a
// full FIFO or a pop from an empty one is ignored (and flagged by an
// assertion). Push and pop may happen in the same cycle.
module reach_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     head,
  output logic empty,
  output logic full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [PW:0]   cnt;
  logic do_push, do_pop;

  assign empty   = (cnt == '0);
  assign full    = (cnt == (PW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign head    = mem[rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (do_push) wr <= (wr == PW'(DEPTH-1)) ? '0 : wr + 1'b1;
      if (do_pop)  rd <= (rd == PW'(DEPTH-1)) ? '0 : rd + 1'b1;
      cnt <= cnt + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wr] <= din;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
