// ht_cache: direct-mapped on-chip cache of hash table entries.
//
// Each line holds an exact copy of one hash table entry plus a tag. The line
// is selected by the CACHE_IDX_W least significant bits of the hash table
// index and the remaining most significant bits are kept as the tag, so a
// line holding another entry with the same low bits (a false positive) is
// recognised as a miss. Reads take one cycle: `rd_en`/`rd_addr` in cycle t
// give `rd_valid`, `rd_hit` and `rd_entry` in cycle t+1. Writes (`wr_en`)
// overwrite the line unconditionally (direct-mapped replacement). A read and
// a write to the same line in one cycle return the old contents.
// After reset, or when `flush` is pulsed, the cache invalidates all lines
// one per cycle and shows `init_busy` meanwhile; no access is allowed then.
// Indexing, tag and replacement follow the design description; the one-cycle
// latency and the sweeping flush are this design's choices.
module ht_cache
  import ht_pkg::*;
#(
  parameter int CACHE_IDX_W = 18   // 256K lines
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  output logic    init_busy,
  input  logic    rd_en,
  input  ht_idx_t rd_addr,
  output logic    rd_valid,
  output logic    rd_hit,
  output entry_t  rd_entry,
  input  logic    wr_en,
  input  ht_idx_t wr_addr,
  input  entry_t  wr_entry
);
  localparam int TAG_W  = HT_IDX_W - CACHE_IDX_W;
  localparam int LINES  = 1 << CACHE_IDX_W;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    entry_t           entry;
  } line_t;

  line_t mem [LINES];

  logic [CACHE_IDX_W-1:0] clr_addr;
  logic                   clearing;
  line_t                  rd_line;
  logic [TAG_W-1:0]       rd_tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (flush) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == CACHE_IDX_W'(LINES - 1)) clearing <= 1'b0;
    end
  end

  // one write port: the flush sweep or a cache write
  always_ff @(posedge clk) begin
    if (clearing)
      mem[clr_addr] <= '0;
    else if (wr_en)
      mem[wr_addr[CACHE_IDX_W-1:0]] <= line_t'{tag: wr_addr[HT_IDX_W-1:CACHE_IDX_W], entry: wr_entry};
  end

  // one read port, registered
  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_line  <= mem[rd_addr[CACHE_IDX_W-1:0]];
      rd_tag_q <= rd_addr[HT_IDX_W-1:CACHE_IDX_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en && !clearing;
  end

  assign init_busy = clearing;
  assign rd_hit    = rd_line.entry.valid && (rd_line.tag == rd_tag_q);
  assign rd_entry  = rd_line.entry;

  a_no_access_in_init: assert property (@(posedge clk) disable iff (!rst_n) clearing |-> !rd_en && !wr_en)
    else $error("ht_cache: access during flush");
endmodule
