// hash_engine_tb: end-to-end test of the engine with a small cache (64
// lines) and the behavioural memory (30-cycle latency, random refusals).
//   1. build: a table S with keys that collide (pairs and a triple sharing
//      one hash index) and repeated keys;
//   2. probe: a table T with matching keys, repeated keys, absent keys and
//      absent keys that collide with present ones; the result rows are
//      compared with a reference join as multisets;
//   3. latency: a cache hit against a cache miss (at least the memory
//      latency slower);
//   4. full chain area: the chain allocator is preset (forced for one
//      cycle) to the last 4 chain entries, then 10 colliding pairs are
//      inserted; ht_full must rise, all heads and exactly 4 chain entries
//      must be stored;
//   5. on-chip mode: build and probe with the cache as the whole hash
//      table; the join must be right and memory never read;
//   6. group-by with SUM, MAX, MIN and COUNT, each on a fresh hash table;
//      every group is found by walking its chain in memory and its
//      aggregate checked.
// It counts collisions, repetitive keys, cache hits, misses, tag
// mismatches and CAM stalls, and fails if any of them never happened.
module hash_engine_tb;
  import ht_pkg::*;
  import tb_ref_pkg::*;

  localparam int CW  = 6;
  localparam int LAT = 30;

  logic clk = 0, rst_n = 0;
  op_e  mode = OP_BUILD;
  agg_e agg  = AGG_SUM;
  logic onchip = 1'b0;
  logic start = 0, busy, ht_full;
  stats_t stats;
  logic in_valid = 0, in_ready;
  key_t in_key;
  val_t in_value;
  logic out_valid, out_ready;
  join_row_t out_row;
  logic ht_req_valid, ht_req_ready, ht_req_we, ht_rsp_valid;
  ht_idx_t ht_req_addr;
  entry_t ht_req_wdata, ht_rsp_data;
  logic [DDR_DW-1:0] rsp_word;

  int checks = 0, failures = 0;

  hash_engine #(.CACHE_IDX_W(CW)) dut (.*);

  ddr3_model #(.AW(DDR_AW), .DW(DDR_DW), .LATENCY(LAT), .READY_PCT(80)) u_mem (
    .clk, .rst_n, .req_valid(ht_req_valid), .req_ready(ht_req_ready), .req_we(ht_req_we),
    .req_addr(DDR_AW'(ht_req_addr)), .req_wdata(entry_to_word(ht_req_wdata)),
    .rsp_valid(ht_rsp_valid), .rsp_data(rsp_word));
  assign ht_rsp_data = word_to_entry(rsp_word);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanisms
  int n_cam_stall = 0, n_tag_miss = 0, n_ht_rd = 0;
  always @(posedge clk) if (rst_n) begin
    if (ht_req_valid && ht_req_ready && !ht_req_we) n_ht_rd++;
    if (dut.cam_match && dut.f2_empty && !dut.f1_empty && !dut.cache_busy) n_cam_stall++;
    if (dut.c_valid && !dut.c_hit && dut.u_cache.rd_line.entry.valid) n_tag_miss++;
  end

  // ------------------------------------------------------ result rows
  int got [logic [95:0]];
  int n_out = 0;
  always @(negedge clk) out_ready <= ($urandom_range(9) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got[out_row]++;
    n_out++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(op_e m, agg_e a, key_t ks[$], val_t vs[$]);
    @(negedge clk);
    mode = m; agg = a; start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < ks.size(); i++) begin
      while ($urandom_range(3) == 0) @(negedge clk);
      in_valid = 1; in_key = ks[i]; in_value = vs[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
    end
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // latency of the first result row of one probe key
  task automatic probe_one(key_t k, output int lat);
    int t0;
    int n0;
    n0 = n_out;
    @(negedge clk);
    in_valid = 1; in_key = k; in_value = 32'hABCD;
    t0 = 0;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    lat = 1;
    while (n_out == n0 && lat < 1000) begin @(negedge clk); lat++; end
    while (busy) @(negedge clk);
  endtask

  // find the group of key k by walking its chain in memory
  function automatic logic walk(key_t k, output entry_t e);
    ht_idx_t a;
    a = {1'b0, ref_hash(k)};
    for (int n = 0; n < 100; n++) begin
      e = word_to_entry(u_mem.peek(DDR_AW'(a)));
      if (!e.valid) return 0;
      if (e.key == k) return 1;
      if (e.ptr_c == '0) return 0;
      a = e.ptr_c;
    end
    return 0;
  endfunction

  key_t s_k[$], t_k[$], g_k[$], distinct[$];
  val_t s_v[$], t_v[$], g_v[$];
  val_t s_map [key_t][$];
  int   expct [logic [95:0]];

  initial begin
    int lat1, lat2, lat3;
    stats_t st_b, st_p;
    search_collisions(200000);
    check("collision search found a triple", triple.size() == 3);
    check("collision search found pairs", coll_a.size() >= 30);

    // ---- table S
    foreach (triple[i]) distinct.push_back(triple[i]);
    for (int i = 0; i < 20; i++) begin distinct.push_back(coll_a[i]); distinct.push_back(coll_b[i]); end
    for (int i = 20; i < 30; i++) distinct.push_back(coll_a[i]);   // coll_b[20..29] only probed
    for (int i = 0; i < 100; i++) distinct.push_back($urandom);
    foreach (distinct[i]) begin
      int reps;
      reps = (i % 4 == 0) ? 1 + $urandom_range(2) : 0;
      for (int r = 0; r <= reps; r++) begin s_k.push_back(distinct[i]); s_v.push_back($urandom); end
    end
    s_k.shuffle();  // keys and values are shuffled apart; keep the pairing by re-drawing values
    foreach (s_k[i]) s_v[i] = $urandom;
    foreach (s_k[i]) s_map[s_k[i]].push_back(s_v[i]);

    // ---- table T
    for (int i = 0; i < 600; i++) begin
      key_t k;
      case ($urandom_range(5))
        0, 1, 2: k = distinct[$urandom_range(distinct.size() - 1)];
        3:       k = t_k.size() ? t_k[t_k.size() - 1] : distinct[0];  // repeat the last key
        4:       k = coll_b[20 + $urandom_range(9)];                   // absent, collides
        default: k = $urandom;                                         // absent
      endcase
      t_k.push_back(k);
      t_v.push_back($urandom);
    end
    foreach (t_k[i])
      if (s_map.exists(t_k[i]))
        foreach (s_map[t_k[i]][j]) expct[{t_k[i], s_map[t_k[i]][j], t_v[i]}]++;

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (busy) @(negedge clk);

    // ---- build
    run(OP_BUILD, AGG_SUM, s_k, s_v);
    st_b = stats;
    check("build: no result rows", n_out == 0);
    check("build: not full", !ht_full);
    $display("build: cache lookups %0d, hash table lookups %0d, collisions %0d, repetitive %0d",
             st_b.cache_lookups, st_b.ht_lookups, st_b.collisions, st_b.repetitive);
    check("build: collisions seen", st_b.collisions >= 22);
    check("build: repetitive keys seen", st_b.repetitive > 0);

    // ---- probe
    run(OP_PROBE, AGG_SUM, t_k, t_v);
    st_p = stats;
    $display("probe: cache lookups %0d, hash table lookups %0d, collisions %0d, repetitive %0d, rows %0d",
             st_p.cache_lookups, st_p.ht_lookups, st_p.collisions, st_p.repetitive, n_out);
    begin
      int n_exp;
      n_exp = 0;
      foreach (expct[r]) n_exp += expct[r];
      check($sformatf("probe: %0d rows, expected %0d", n_out, n_exp), n_out == n_exp);
      foreach (expct[r]) begin
        checks++;
        if (!got.exists(r) || got[r] != expct[r]) begin
          failures++;
          $display("FAIL: row %h expected %0d times, got %0d", r, expct[r], got.exists(r) ? got[r] : 0);
        end
      end
      foreach (got[r]) if (!expct.exists(r)) begin
        checks++; failures++; $display("FAIL: unexpected row %h", r);
      end
    end
    check("probe: cache hits", st_p.cache_lookups > st_p.ht_lookups);
    check("probe: cache misses", st_p.ht_lookups > 0);
    check("probe: collisions", st_p.collisions > 0);
    check("probe: repetitive", st_p.repetitive > 0);

    // ---- latency: hit against miss
    begin
      key_t x, v;
      x = 0; v = 0;
      for (int i = 23; i < distinct.size() && v == 0; i++)
        for (int j = i + 1; j < distinct.size(); j++)
          if (ref_hash(distinct[i]) % (1 << CW) == ref_hash(distinct[j]) % (1 << CW)
              && ref_hash(distinct[i]) != ref_hash(distinct[j])) begin
            x = distinct[i]; v = distinct[j]; break;
          end
      check("latency: found two keys on one cache line", v != 0);
      probe_one(x, lat1);
      probe_one(x, lat2);   // now in the cache
      probe_one(v, lat1);   // evicts x
      probe_one(x, lat3);   // miss
      $display("latency: hit %0d cycles, miss %0d cycles", lat2, lat3);
      check("latency: hit within 14 cycles", lat2 <= 14);
      check("latency: miss costs the memory latency", lat3 - lat2 >= LAT);
    end

    // ---- full chain area: the allocator is preset to the last 4 chain entries,
    // then 10 colliding pairs need 10 chain entries; 6 inserts must be dropped
    begin
      key_t fk[$];
      val_t fv[$];
      entry_t e;
      int n_a, n_b;
      n_a = 0; n_b = 0;
      u_mem.mem.delete();
      @(negedge clk);
      mode = OP_BUILD; agg = AGG_SUM; start = 1;
      @(negedge clk) start = 0;
      force dut.p_next = '1 - ht_idx_t'(3);
      @(negedge clk) release dut.p_next;
      check("full: flag clear after start", !ht_full);
      for (int i = 0; i < 10; i++) begin
        fk.push_back(coll_a[i]); fv.push_back(i);
        fk.push_back(coll_b[i]); fv.push_back(100 + i);
      end
      for (int i = 0; i < fk.size(); i++) begin
        in_valid = 1; in_key = fk[i]; in_value = fv[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk) in_valid = 0;
      end
      while (busy) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        if (walk(coll_a[i], e) && e.value == val_t'(i)) n_a++;
        if (walk(coll_b[i], e) && e.value == val_t'(100 + i)) n_b++;
      end
      $display("full: heads stored %0d, chain entries stored %0d, ht_full %0b", n_a, n_b, ht_full);
      check("full: ht_full raised", ht_full);
      check("full: every head entry stored", n_a == 10);
      check("full: exactly the 4 free chain entries used", n_b == 4);
    end

    // ---- on-chip mode: the cache is the whole hash table (32 heads, 32 chain
    // entries here); build and probe must never read memory
    begin
      key_t ok_[$], ob_k[$], op_k[$];
      val_t ob_v[$], op_v[$];
      val_t om [key_t][$];
      int   oexp [logic [95:0]];
      int   n_rd0, n_e, bad;
      for (int i = 0; i < 20; i++) ok_.push_back($urandom);
      foreach (ok_[i]) begin
        ob_k.push_back(ok_[i]); ob_v.push_back($urandom);
        if (i % 4 == 0) begin ob_k.push_back(ok_[i]); ob_v.push_back($urandom); end
      end
      foreach (ob_k[i]) om[ob_k[i]].push_back(ob_v[i]);
      for (int i = 0; i < 60; i++) begin
        op_k.push_back((i % 3 == 0) ? key_t'($urandom) : ok_[$urandom_range(19)]);
        op_v.push_back($urandom);
      end
      foreach (op_k[i])
        if (om.exists(op_k[i])) foreach (om[op_k[i]][j]) oexp[{op_k[i], om[op_k[i]][j], op_v[i]}]++;
      u_mem.mem.delete();
      got.delete();
      n_out = 0;
      n_rd0 = n_ht_rd;
      onchip = 1'b1;
      run(OP_BUILD, AGG_SUM, ob_k, ob_v);
      check("on-chip build: table fits", !ht_full);
      run(OP_PROBE, AGG_SUM, op_k, op_v);
      onchip = 1'b0;
      n_e = 0;
      foreach (oexp[r]) n_e += oexp[r];
      bad = 0;
      foreach (oexp[r]) if (!got.exists(r) || got[r] != oexp[r]) bad++;
      foreach (got[r]) if (!oexp.exists(r)) bad++;
      $display("on-chip: probe rows %0d expected %0d, memory reads %0d, collisions %0d",
               n_out, n_e, n_ht_rd - n_rd0, stats.collisions);
      check("on-chip: result rows equal the reference join", bad == 0 && n_out == n_e);
      check("on-chip: no memory reads", n_ht_rd == n_rd0);
      check("on-chip: no hash table lookups counted", stats.ht_lookups == 0);
    end

    // ---- group-by with SUM, MAX, MIN and COUNT, each on a cleared hash table
    for (int pass = 0; pass < 4; pass++) begin
      val_t ref_agg [key_t];
      key_t gk[$];
      int ok;
      agg_e a;
      a = agg_e'(pass);
      ref_agg.delete();
      gk.delete();
      foreach (triple[i]) gk.push_back(triple[i]);
      for (int i = 0; i < 10; i++) begin gk.push_back(coll_a[i]); gk.push_back(coll_b[i]); end
      for (int i = 0; i < 20; i++) gk.push_back($urandom);
      g_k.delete(); g_v.delete();
      for (int i = 0; i < 500; i++) begin
        key_t k;
        val_t v;
        k = gk[$urandom_range(gk.size() - 1)];
        v = $urandom_range(100000);
        g_k.push_back(k); g_v.push_back(v);
        if (!ref_agg.exists(k)) ref_agg[k] = (a == AGG_COUNT) ? 1 : v;
        else case (a)
          AGG_SUM:   ref_agg[k] = ref_agg[k] + v;
          AGG_MAX:   ref_agg[k] = (v > ref_agg[k]) ? v : ref_agg[k];
          AGG_MIN:   ref_agg[k] = (v < ref_agg[k]) ? v : ref_agg[k];
          AGG_COUNT: ref_agg[k] = ref_agg[k] + 1;
        endcase
      end
      u_mem.mem.delete();
      run(OP_GROUPBY, a, g_k, g_v);
      $display("group-by %s: cache lookups %0d, hash table lookups %0d, collisions %0d, aggregations %0d",
               a.name(), stats.cache_lookups, stats.ht_lookups, stats.collisions, stats.repetitive);
      ok = 1;
      foreach (ref_agg[k]) begin
        entry_t e;
        checks++;
        if (!walk(k, e) || e.value != ref_agg[k] || e.ptr_r != '0) begin
          failures++; ok = 0;
          $display("FAIL: group %h: found %0b value %0d expected %0d", k, walk(k, e), e.value, ref_agg[k]);
        end
      end
      check("group-by: entries written = groups", u_mem.mem.size() == ref_agg.size());
      check("group-by: hit ratio above 50%", stats.ht_lookups * 2 < stats.cache_lookups);
    end

    $display("mechanisms: CAM stalls %0d, tag mismatches %0d", n_cam_stall, n_tag_miss);
    check("CAM stall happened", n_cam_stall > 0);
    check("tag mismatch (false positive) happened", n_tag_miss > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
