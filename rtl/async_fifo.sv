// async_fifo: first-in first-out queue between two clock domains.
//
// Used for the command and status records that pass between the host link
// clock domain and the engine clock domain. Write and read pointers are
// kept in binary and Gray code; each Gray pointer is passed to the other
// domain through a two-flop synchroniser, where it is compared to decide
// `full` (write side) and `empty` (read side). `rdata` shows the oldest entry
// while `!empty`; `rd_en` removes it. DEPTH must be a power of two.
// That synchronizing FIFOs join the two clock domains follows the design
// description; the Gray-code construction and the depth are this design's.
module async_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 4
) (
  input  logic wclk,
  input  logic wrst_n,
  input  logic wr_en,
  input  T     wdata,
  output logic full,
  input  logic rclk,
  input  logic rrst_n,
  input  logic rd_en,
  output T     rdata,
  output logic empty
);
  localparam int AW = $clog2(DEPTH);

  T mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer in the read domain
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer in the write domain
  logic [AW:0] wbin_nxt, rbin_nxt, wgray_nxt, rgray_nxt;

  assign wbin_nxt  = wbin + (AW+1)'(wr_en && !full);
  assign wgray_nxt = (wbin_nxt >> 1) ^ wbin_nxt;
  assign rbin_nxt  = rbin + (AW+1)'(rd_en && !empty);
  assign rgray_nxt = (rbin_nxt >> 1) ^ rbin_nxt;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wgray_nxt;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rgray_nxt;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
