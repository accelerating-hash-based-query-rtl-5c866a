// hash_engine: hash join (build and probe) and group-by engine with a
// direct-mapped cache of the hash table in on-chip memory.
//
// Data flow (one key accepted per cycle at most):
//   1. lfsr_hash turns the key into its hash index (the chain head).
//   2. New keys wait in Cache_Read_F1. Requests that follow a pointer
//      (collision or repetitive-key chains) wait in Cache_Read_F2, which has
//      priority at the cache read port. A new key enters only if a CAM slot is
//      free and, in build and group-by, no request in flight has the same hash
//      index (raw_cam), which removes read-after-write hazards.
//   3. The cache answers one cycle later. A hit goes to the engine logic; a
//      miss (invalid line or wrong tag) is forwarded to HashTable_Read_F1.
//   4. The hash table port serves HashTable_Write_F1 before HashTable_Read_F1.
//      Read responses come back in request order and go to the logic, which
//      serves them before cache hits. Every valid entry read from the hash
//      table is also written into the cache (Cache_Write_F3).
//   5. The logic decides per entry:
//      build   - empty head: store the pair; same key: allocate a chain entry
//                and link it behind the head through pointer_r; other key:
//                follow pointer_c, or at the chain end allocate a chain entry
//                and link it through pointer_c.
//      probe   - same key: emit (k, v_s, v_t) and follow pointer_r for further
//                values; other key: follow pointer_c; end of chain: no match.
//      group-by- empty head: store; same key: aggregate into the entry (SUM,
//                MAX, MIN or COUNT); other key: as in build.
//      Every change to an entry is written to both the cache and the hash
//      table (write-through), through Cache_Write_F3 and HashTable_Write_F1.
// Chain entries are allocated one after the other in the upper half of the
// hash table, which the hash function never addresses; a pointer of 0 means
// none. When the chain area is exhausted the insert is dropped and `ht_full`
// is set. At most NTOK requests are in flight; every internal queue is deep
// enough for all of them, so only the result queue and the write queues
// can stall the logic.
// Hash table port: requests with valid/ready, read data returned in order
// with `ht_rsp_valid` (no backpressure), any latency.
// `onchip` selects the mode for small inputs in which the cache is the whole
// hash table: head indices are cut to CACHE_IDX_W-1 bits, chain entries are
// taken from the upper half of the cache lines, and a cache miss (which can
// then only be an invalid line) is an empty entry, never a memory read.
// Entry changes are still written through, so the finished table is in
// memory too.
// `start` (one cycle, engine idle) clears the statistics and, for build and
// group-by, flushes the cache and restarts the chain allocation. `mode` and
// `agg` must stay constant while `busy`.
// The field set, the cache policy, the queue names, the arbitration and the
// chaining follow the design description; the aggregation on a key match
// updates the stored value, the hand-off rules between the queues, the
// priorities and the queue depths are this design's choices.
module hash_engine
  import ht_pkg::*;
#(
  parameter int CACHE_IDX_W = 18,
  parameter int HASH_STAGES = 4,
  parameter int OUT_DEPTH   = 4,
  parameter int WQ_DEPTH    = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  op_e       mode,
  input  agg_e      agg,
  input  logic      onchip,
  input  logic      start,
  output logic      busy,
  output logic      ht_full,
  output stats_t    stats,
  // input tuples
  input  logic      in_valid,
  output logic      in_ready,
  input  key_t      in_key,
  input  val_t      in_value,
  // join result rows
  output logic      out_valid,
  input  logic      out_ready,
  output join_row_t out_row,
  // hash table in external memory
  output logic      ht_req_valid,
  input  logic      ht_req_ready,
  output logic      ht_req_we,
  output ht_idx_t   ht_req_addr,
  output entry_t    ht_req_wdata,
  input  logic      ht_rsp_valid,
  input  entry_t    ht_rsp_data
);
  typedef struct packed {
    tok_t   tok;
    entry_t e;
    logic   from_ht;
  } item_t;

  localparam ht_idx_t CHAIN_BASE = ht_idx_t'(1) << (HT_IDX_W - 1);
  // on-chip mode: heads in the lower half of the cache lines, chains in the upper half
  localparam ht_idx_t OC_CHAIN_BASE = ht_idx_t'(1) << (CACHE_IDX_W - 1);
  localparam ht_idx_t OC_LAST       = (ht_idx_t'(1) << CACHE_IDX_W) - 1'b1;

  // ---------------------------------------------------------------- hash
  logic        hv;
  logic [HASH_W-1:0] hidx;
  key_t        hkey;
  val_t        hval;
  logic        hash_en;
  logic        f1_full, f1_empty;
  tok_t        f1_in, f1_out;
  logic        f1_pop;
  logic [$clog2(HASH_STAGES+2)-1:0] in_pipe;

  assign hash_en  = !(hv && f1_full);
  assign in_ready = hash_en;

  lfsr_hash #(.KEY_W(KEY_W), .HASH_W(HASH_W), .PAYLOAD_W(VAL_W), .STAGES(HASH_STAGES)) u_hash (
    .clk, .rst_n, .en(hash_en),
    .in_valid(in_valid), .in_key(in_key), .in_payload(in_value),
    .out_valid(hv), .out_hash(hidx), .out_key(hkey), .out_payload(hval)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_pipe <= '0;
    else in_pipe <= in_pipe + ($bits(in_pipe))'(in_valid && in_ready) - ($bits(in_pipe))'(hv && hash_en);
  end

  // on-chip mode: the head index is folded into the lower half of the cache
  ht_idx_t head_idx;
  assign head_idx = onchip ? (ht_idx_t'(hidx) & (OC_CHAIN_BASE - 1'b1)) : {1'b0, hidx};
  assign f1_in = '{key: hkey, value: hval, head: head_idx, addr: head_idx, slot: '0};

  sync_fifo #(.T(tok_t), .DEPTH(NTOK)) u_cache_read_f1 (
    .clk, .rst_n, .push(hv && hash_en), .din(f1_in), .pop(f1_pop),
    .dout(f1_out), .full(f1_full), .empty(f1_empty), .count()
  );

  // --------------------------------------------------- cache read arbiter
  logic  f2_push, f2_pop, f2_empty;
  tok_t  f2_in, f2_out;
  logic  cam_match, cam_any_free;
  slot_t cam_free_slot;
  logic  cache_busy;
  logic  rd_en;
  tok_t  rd_tok, c_tok;
  logic  sel_f2, sel_f1;
  logic  c_valid, c_hit;
  entry_t c_entry;

  sync_fifo #(.T(tok_t), .DEPTH(NTOK)) u_cache_read_f2 (
    .clk, .rst_n, .push(f2_push), .din(f2_in), .pop(f2_pop),
    .dout(f2_out), .full(), .empty(f2_empty), .count()
  );

  assign sel_f2 = !cache_busy && !f2_empty;
  assign sel_f1 = !cache_busy && f2_empty && !f1_empty && cam_any_free && !cam_match;
  assign rd_en  = sel_f2 || sel_f1;
  assign f2_pop = sel_f2;
  assign f1_pop = sel_f1;

  always_comb begin
    rd_tok = f2_out;
    if (!sel_f2) begin
      rd_tok      = f1_out;
      rd_tok.slot = cam_free_slot;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) c_tok <= rd_tok;
  end

  // ------------------------------------------------------------- cache
  logic    f3_push, f3_pop, f3_empty, f3_full;
  wr_req_t f3_in, f3_out;

  ht_cache #(.CACHE_IDX_W(CACHE_IDX_W)) u_cache (
    .clk, .rst_n,
    .flush(start && mode != OP_PROBE),
    .init_busy(cache_busy),
    .rd_en(rd_en), .rd_addr(rd_tok.addr),
    .rd_valid(c_valid), .rd_hit(c_hit), .rd_entry(c_entry),
    .wr_en(f3_pop), .wr_addr(f3_out.addr), .wr_entry(f3_out.entry)
  );

  sync_fifo #(.T(wr_req_t), .DEPTH(WQ_DEPTH)) u_cache_write_f3 (
    .clk, .rst_n, .push(f3_push), .din(f3_in), .pop(f3_pop),
    .dout(f3_out), .full(f3_full), .empty(f3_empty), .count()
  );
  assign f3_pop = !f3_empty && !cache_busy;

  // hits to the logic, misses to the hash table
  logic  crq_empty, crq_pop;
  item_t crq_out;
  logic  hrq_empty, hrq_pop;
  tok_t  hrq_out;

  sync_fifo #(.T(item_t), .DEPTH(NTOK)) u_hit_q (
    .clk, .rst_n, .push(c_valid && (c_hit || onchip)),
    .din('{tok: c_tok, e: (c_hit ? c_entry : entry_t'('0)), from_ht: 1'b0}),
    .pop(crq_pop), .dout(crq_out), .full(), .empty(crq_empty), .count()
  );

  sync_fifo #(.T(tok_t), .DEPTH(NTOK)) u_hashtable_read_f1 (
    .clk, .rst_n, .push(c_valid && !c_hit && !onchip), .din(c_tok),
    .pop(hrq_pop), .dout(hrq_out), .full(), .empty(hrq_empty), .count()
  );

  // ------------------------------------------------ hash table arbiter
  logic    htw_push, htw_pop, htw_empty, htw_full;
  wr_req_t htw_in, htw_out;
  logic    otq_empty;
  tok_t    otq_out;
  logic    drq_empty, drq_pop;
  item_t   drq_out;

  sync_fifo #(.T(wr_req_t), .DEPTH(WQ_DEPTH)) u_hashtable_write_f1 (
    .clk, .rst_n, .push(htw_push), .din(htw_in), .pop(htw_pop),
    .dout(htw_out), .full(htw_full), .empty(htw_empty), .count()
  );

  assign ht_req_valid = !htw_empty || !hrq_empty;
  assign ht_req_we    = !htw_empty;
  assign ht_req_addr  = !htw_empty ? htw_out.addr : hrq_out.addr;
  assign ht_req_wdata = htw_out.entry;
  assign htw_pop      = ht_req_ready && !htw_empty;
  assign hrq_pop      = ht_req_ready && htw_empty && !hrq_empty;

  // requests waiting for their hash table response, in order
  sync_fifo #(.T(tok_t), .DEPTH(NTOK)) u_outstanding_q (
    .clk, .rst_n, .push(hrq_pop), .din(hrq_out), .pop(ht_rsp_valid),
    .dout(otq_out), .full(), .empty(otq_empty), .count()
  );

  sync_fifo #(.T(item_t), .DEPTH(NTOK)) u_ht_resp_q (
    .clk, .rst_n, .push(ht_rsp_valid), .din('{tok: otq_out, e: ht_rsp_data, from_ht: 1'b1}),
    .pop(drq_pop), .dout(drq_out), .full(), .empty(drq_empty), .count()
  );

  // ------------------------------------------------------------- logic
  item_t   it;
  logic    it_valid;
  logic    st;           // second step of an insert that links a new entry
  ht_idx_t p_q;          // entry allocated in the first step
  ht_idx_t p_next;       // next free chain entry
  logic    p_exhausted;
  logic    out_full, out_empty, out_push;
  join_row_t out_in;

  logic    go, retire, done_item, alloc_p, set_full;
  logic    cnt_coll, cnt_rep;
  logic    need_out, need_f3, need_htw, need_f2;
  entry_t  e;
  tok_t    t;
  logic    same;
  val_t    agg_val, init_val;

  // an insert that takes two steps keeps its source for the second step
  logic src_ht, src_ht_q;
  assign src_ht   = st ? src_ht_q : !drq_empty;
  assign it_valid = src_ht ? !drq_empty : !crq_empty;
  assign it       = src_ht ? drq_out : crq_out;
  assign e        = it.e;
  assign t        = it.tok;
  assign same     = e.valid && (e.key == t.key);

  always_comb begin
    unique case (agg)
      AGG_SUM:   agg_val = e.value + t.value;
      AGG_MAX:   agg_val = (t.value > e.value) ? t.value : e.value;
      AGG_MIN:   agg_val = (t.value < e.value) ? t.value : e.value;
      AGG_COUNT: agg_val = e.value + 1'b1;
      default:   agg_val = e.value;
    endcase
    init_val = (agg == AGG_COUNT) ? val_t'(1) : t.value;
  end

  always_comb begin
    need_out  = 1'b0;
    need_f3   = 1'b0;
    need_htw  = 1'b0;
    need_f2   = 1'b0;
    f2_in     = t;
    f3_in     = '{addr: t.addr, entry: e, slot: t.slot};
    htw_in    = '{addr: t.addr, entry: e, slot: t.slot};
    out_in    = '{key: t.key, v_s: e.value, v_t: t.value};
    retire    = 1'b0;
    done_item = 1'b0;
    alloc_p   = 1'b0;
    set_full  = 1'b0;
    cnt_coll  = 1'b0;
    cnt_rep   = 1'b0;
    if (it_valid) begin
      if (mode == OP_PROBE) begin
        need_f3   = it.from_ht && e.valid;          // refill the cache
        done_item = 1'b1;
        if (same) begin
          need_out = 1'b1;
          if (e.ptr_r != '0) begin
            need_f2    = 1'b1;
            f2_in.addr = e.ptr_r;
            cnt_rep    = 1'b1;
          end else retire = 1'b1;
        end else if (e.valid && e.ptr_c != '0) begin
          need_f2    = 1'b1;
          f2_in.addr = e.ptr_c;
          cnt_coll   = 1'b1;
        end else retire = 1'b1;
      end else begin
        // build and group-by
        if (!e.valid) begin
          need_f3   = 1'b1;
          need_htw  = 1'b1;
          f3_in.entry = '{valid: 1'b1, key: t.key,
                          value: (mode == OP_GROUPBY) ? init_val : t.value,
                          ptr_c: '0, ptr_r: '0};
          htw_in.entry = f3_in.entry;
          retire    = 1'b1;
          done_item = 1'b1;
        end else if (same && mode == OP_GROUPBY) begin
          need_f3   = 1'b1;
          need_htw  = 1'b1;
          f3_in.entry       = e;
          f3_in.entry.value = agg_val;
          htw_in.entry      = f3_in.entry;
          cnt_rep   = 1'b1;
          retire    = 1'b1;
          done_item = 1'b1;
        end else if (!same && e.ptr_c != '0) begin
          need_f3    = it.from_ht;                 // refill the cache
          need_f2    = 1'b1;
          f2_in.addr = e.ptr_c;
          cnt_coll   = 1'b1;
          done_item  = 1'b1;
        end else if (!st) begin
          // allocate a chain entry and store the new pair there
          if (p_exhausted) begin
            set_full  = 1'b1;
            retire    = 1'b1;
            done_item = 1'b1;
          end else begin
            alloc_p  = 1'b1;
            need_f3  = 1'b1;
            need_htw = 1'b1;
            f3_in.addr  = p_next;
            f3_in.entry = '{valid: 1'b1, key: t.key,
                            value: (mode == OP_GROUPBY) ? init_val : t.value,
                            ptr_c: '0, ptr_r: same ? e.ptr_r : '0};
            htw_in = f3_in;
            cnt_coll = !same;
            cnt_rep  = same;
          end
        end else begin
          // link the entry allocated in the first step
          need_f3  = 1'b1;
          need_htw = 1'b1;
          f3_in.entry = e;
          if (same) f3_in.entry.ptr_r = p_q;
          else      f3_in.entry.ptr_c = p_q;
          htw_in.entry = f3_in.entry;
          retire    = 1'b1;
          done_item = 1'b1;
        end
      end
    end
    go = it_valid && !(need_out && out_full) && !(need_f3 && f3_full) && !(need_htw && htw_full);
  end

  assign f2_push  = go && need_f2;
  assign f3_push  = go && need_f3;
  assign htw_push = go && need_htw;
  assign out_push = go && need_out;
  assign drq_pop  = go && done_item && src_ht;
  assign crq_pop  = go && done_item && !src_ht;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= 1'b0;
      src_ht_q    <= 1'b0;
      p_q         <= '0;
      p_next      <= CHAIN_BASE;
      p_exhausted <= 1'b0;
      ht_full     <= 1'b0;
    end else if (start) begin
      st          <= 1'b0;
      if (mode != OP_PROBE) begin
        p_next      <= onchip ? OC_CHAIN_BASE : CHAIN_BASE;
        p_exhausted <= 1'b0;
        ht_full     <= 1'b0;
      end
    end else if (go) begin
      if (alloc_p) begin
        st       <= 1'b1;
        src_ht_q <= src_ht;
        p_q    <= p_next;
        p_next <= p_next + 1'b1;
        if (p_next == (onchip ? OC_LAST : '1)) p_exhausted <= 1'b1;
      end
      if (done_item) st <= 1'b0;
      if (set_full) ht_full <= 1'b1;
    end
  end

  sync_fifo #(.T(join_row_t), .DEPTH(OUT_DEPTH)) u_out_q (
    .clk, .rst_n, .push(out_push), .din(out_in), .pop(out_valid && out_ready),
    .dout(out_row), .full(out_full), .empty(out_empty), .count()
  );
  assign out_valid = !out_empty;

  // --------------------------------------------------------------- CAM
  logic [$clog2(NTOK+1)-1:0] cam_busy;
  slot_t wq_push_slot [2];
  slot_t wq_done_slot [2];
  assign wq_push_slot[0] = t.slot;
  assign wq_push_slot[1] = t.slot;
  assign wq_done_slot[0] = f3_out.slot;
  assign wq_done_slot[1] = htw_out.slot;

  raw_cam #(.N(NTOK)) u_cam (
    .clk, .rst_n,
    .check(mode != OP_PROBE), .lookup_idx(f1_out.head), .match(cam_match),
    .any_free(cam_any_free), .free_slot(cam_free_slot),
    .alloc(sel_f1), .alloc_idx(f1_out.head),
    .retire(go && retire), .retire_slot(t.slot),
    .wq_push({htw_push, f3_push}), .wq_push_slot(wq_push_slot),
    .wq_done({htw_pop, f3_pop}), .wq_done_slot(wq_done_slot),
    .busy_count(cam_busy)
  );

  // -------------------------------------------------------- statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else if (start) begin
      stats <= '0;
    end else begin
      if (rd_en)                stats.cache_lookups <= stats.cache_lookups + 1'b1;
      if (hrq_pop)              stats.ht_lookups    <= stats.ht_lookups + 1'b1;
      if (go && cnt_coll)       stats.collisions <= stats.collisions + 1'b1;
      if (go && cnt_rep)        stats.repetitive    <= stats.repetitive + 1'b1;
    end
  end

  assign busy = (in_pipe != '0) || !f1_empty || (cam_busy != '0) || !f3_empty || !htw_empty
             || cache_busy || !out_empty;

  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n) ht_rsp_valid |-> !otq_empty)
    else $error("hash_engine: hash table response without request");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> (cam_busy == '0) && (in_pipe == '0) && f1_empty)
    else $error("hash_engine: start while busy");
endmodule
