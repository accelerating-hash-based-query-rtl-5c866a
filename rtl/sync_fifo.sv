// sync_fifo: single-clock first-in first-out queue.
//
// Used for every request queue of the engine (cache read, cache write, hash
// table read and write queues, response queues). Data written while
// `push && !full` is stored; `dout` shows the oldest entry while `!empty`
// and `pop` removes it. Push and pop may happen in the same cycle, also when
// full (the pop frees the place). No read latency: `dout` is combinational
// from the storage. `count` gives the fill level. Depth and the element type
// are parameters; the queues are named in the design, their depth and this
// implementation are this design's choices.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic full,
  output logic empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                    mem [DEPTH];
  logic [AW-1:0]       wp, rp;
  logic [$clog2(DEPTH+1)-1:0] n;

  logic do_push, do_pop;
  assign do_pop  = pop && (n != 0);
  assign do_push = push && ((n != DEPTH[$clog2(DEPTH+1)-1:0]) || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      n  <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      n <= n + (($clog2(DEPTH+1))'(do_push)) - (($clog2(DEPTH+1))'(do_pop));
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  assign dout  = mem[rp];
  assign full  = (n == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (n == 0);
  assign count = n;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push && full |-> pop)
    else $error("sync_fifo: push while full");
endmodule
