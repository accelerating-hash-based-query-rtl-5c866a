// ht_pkg: types and constants shared by the hash join / group-by engine.
//
// A hash table entry carries the fields listed for the design: a valid bit,
// the key, the value, a collision pointer (pointer_c) and a repetitive-key
// pointer (pointer_r). The cache adds a tag to this entry (see ht_cache).
// Keys and values are 32 bits each, as in the evaluated design.
// The hash table index width, the entry layout in a 128-bit DDR word, the
// null-pointer encoding and the number of requests in flight are choices of
// this design: the hash table is split into a directly indexed lower half and
// a chain area (upper half, MSB set); chain pointers always point into the
// upper half, so the value 0 serves as "no pointer".
package ht_pkg;

  localparam int KEY_W    = 32;  // key width
  localparam int VAL_W    = 32;  // value width
  localparam int HT_IDX_W = 24;  // hash table index: 16M entries (8M direct + 8M chain)
  localparam int HASH_W   = HT_IDX_W - 1; // the hash function covers the lower half only
  localparam int DDR_AW   = 28;  // DDR word address: 4 GB / 16 B
  localparam int DDR_DW   = 128; // DDR word
  localparam int NTOK     = 16;  // requests (tokens) in flight in the engine, = CAM entries
  localparam int SLOT_W   = $clog2(NTOK);

  typedef logic [KEY_W-1:0]    key_t;
  typedef logic [VAL_W-1:0]    val_t;
  typedef logic [HT_IDX_W-1:0] ht_idx_t;
  typedef logic [SLOT_W-1:0]   slot_t;

  // One hash table entry (113 bits, stored zero-extended in one DDR word).
  typedef struct packed {
    logic    valid;
    key_t    key;
    val_t    value;
    ht_idx_t ptr_c;  // next entry with a different key and the same hash index
    ht_idx_t ptr_r;  // next entry with the same key (hash join only)
  } entry_t;

  localparam int ENTRY_W = $bits(entry_t);

  typedef enum logic [1:0] {
    OP_BUILD   = 2'd0,  // hash join build phase
    OP_PROBE   = 2'd1,  // hash join probe phase
    OP_GROUPBY = 2'd2   // group-by aggregation
  } op_e;

  typedef enum logic [1:0] {
    AGG_SUM   = 2'd0,
    AGG_MAX   = 2'd1,
    AGG_MIN   = 2'd2,
    AGG_COUNT = 2'd3
  } agg_e;

  // A request travelling through the engine carries its whole context.
  typedef struct packed {
    key_t    key;
    val_t    value;
    ht_idx_t head;   // hash index of the key (the chain head)
    ht_idx_t addr;   // entry being looked up now
    slot_t   slot;   // CAM slot held by this request
  } tok_t;

  // One row of a probe result: (k, v_s, v_t).
  typedef struct packed {
    key_t key;
    val_t v_s;
    val_t v_t;
  } join_row_t;

  // Write to the hash table (DDR) or to the cache, tagged with its request.
  typedef struct packed {
    ht_idx_t addr;
    entry_t  entry;
    slot_t   slot;
  } wr_req_t;

  // Host command.
  typedef struct packed {
    op_e                op;
    agg_e               agg;
    logic               onchip;    // hash table held entirely in the cache, memory never read
    logic [DDR_AW-1:0]  src_base;  // first DDR word of the input table
    logic [31:0]        n_rows;    // rows in the input table
    logic [DDR_AW-1:0]  dst_base;  // first DDR word of the join result (probe)
  } cmd_t;

  // Statistics of one command, as reported in the evaluation.
  typedef struct packed {
    logic [31:0] cache_lookups;  // reads of the cache
    logic [31:0] ht_lookups;     // reads of the hash table (cache misses)
    logic [31:0] collisions;     // steps along or extensions of a collision chain
    logic [31:0] repetitive;     // steps along or extensions of a repetitive-key chain, aggregations
  } stats_t;

  // Completion record returned to the host.
  typedef struct packed {
    op_e         op;
    logic        ht_full;      // an insert was dropped because the chain area was full
    logic [31:0] out_rows;     // result rows written (probe)
    stats_t      stats;
  } status_t;

  // Entry of a DDR word: entry in the low bits.
  function automatic logic [DDR_DW-1:0] entry_to_word(entry_t e);
    return DDR_DW'(e);
  endfunction

  function automatic entry_t word_to_entry(logic [DDR_DW-1:0] w);
    return entry_t'(w[ENTRY_W-1:0]);  // bits above the entry are unused
  endfunction

endpackage
