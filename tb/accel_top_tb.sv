// accel_top_tb: whole accelerator at its default sizes (256K-line cache,
// 16M-entry hash table) with the behavioural memory (30-cycle latency,
// random refusals), host link at 150 MHz and core at 200 MHz.
// The host loads the input tables into memory and issues:
//   1. build of S (collisions, a three-key chain, repeated keys, keys that
//      share a cache line);
//   2. probe of T; the result table in memory is compared with a
//      reference join as a multiset and the row count in the status;
//   3. group-by (SUM) of G on a cleared hash table; every group is found
//      by walking its chain in memory.
// It counts how often each mechanism of the design happened (collision
// chains, repetitive-key chains, cache hits, misses, tag mismatches, CAM
// stalls, write-through, result back-pressure at the memory port, status
// crossing) and fails if one never did.
module accel_top_tb;
  import ht_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [DDR_AW-1:0] S_BASE = 28'h100_0000;
  localparam logic [DDR_AW-1:0] T_BASE = 28'h110_0000;
  localparam logic [DDR_AW-1:0] R_BASE = 28'h120_0000;
  localparam logic [DDR_AW-1:0] G_BASE = 28'h130_0000;
  localparam int LAT = 30;

  logic hclk = 0, clk = 0, hrst_n = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_cmd_ready, host_sts_valid, host_sts_ready = 0;
  cmd_t host_cmd;
  status_t host_sts;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [DDR_AW-1:0] mem_req_addr;
  logic [DDR_DW-1:0] mem_req_wdata, mem_rsp_data;

  int checks = 0, failures = 0;

  accel_top dut (.*);

  ddr3_model #(.AW(DDR_AW), .DW(DDR_DW), .LATENCY(LAT), .READY_PCT(90)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  always #3.333 hclk = ~hclk;
  always #2.5   clk  = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanisms
  int n_cam_stall = 0, n_tag_miss = 0, n_hit = 0, n_miss = 0, n_wt = 0, n_res_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_engine.cam_match && dut.u_engine.f2_empty && !dut.u_engine.f1_empty
        && !dut.u_engine.cache_busy) n_cam_stall++;
    if (dut.u_engine.c_valid && !dut.u_engine.c_hit && dut.u_engine.u_cache.rd_line.entry.valid) n_tag_miss++;
    if (dut.u_engine.c_valid &&  dut.u_engine.c_hit) n_hit++;
    if (dut.u_engine.c_valid && !dut.u_engine.c_hit) n_miss++;
    if (dut.u_engine.htw_push) n_wt++;
    if (dut.u_ctrl.eng_out_valid && !dut.u_ctrl.eng_out_ready) n_res_stall++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host_run(op_e op, agg_e agg, logic [DDR_AW-1:0] src, int n,
                          logic [DDR_AW-1:0] dst, output status_t s);
    @(negedge hclk);
    host_cmd = '{op: op, agg: agg, onchip: 1'b0, src_base: src, n_rows: n, dst_base: dst};
    host_cmd_valid = 1;
    @(posedge hclk);
    while (!host_cmd_ready) @(posedge hclk);
    @(negedge hclk) host_cmd_valid = 0;
    while (!host_sts_valid) @(negedge hclk);
    s = host_sts;
    host_sts_ready = 1;
    @(negedge hclk) host_sts_ready = 0;
  endtask

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

  key_t distinct[$], s_k[$], t_k[$], g_k[$];
  val_t s_v[$], t_v[$], g_v[$];
  val_t s_map [key_t][$];
  int   expct [logic [95:0]];

  initial begin
    status_t st;
    int n_exp;
    search_collisions(200000);
    search_lines(3000, 18);
    check("a three-key collision was found", triple.size() == 3);
    check("colliding pairs were found", coll_a.size() >= 40);
    check("cache-line pairs were found", line_a.size() >= 20);

    // ---- S: 1 triple, 30 colliding pairs, 10 halves of pairs, 20 line pairs, 400 random keys
    foreach (triple[i]) distinct.push_back(triple[i]);
    for (int i = 0; i < 30; i++) begin distinct.push_back(coll_a[i]); distinct.push_back(coll_b[i]); end
    for (int i = 30; i < 40; i++) distinct.push_back(coll_a[i]);
    for (int i = 0; i < 20; i++) begin distinct.push_back(line_a[i]); distinct.push_back(line_b[i]); end
    for (int i = 0; i < 400; i++) distinct.push_back($urandom);
    foreach (distinct[i]) begin
      int reps;
      reps = (i % 5 == 0) ? 1 + $urandom_range(3) : 0;
      for (int r = 0; r <= reps; r++) s_k.push_back(distinct[i]);
    end
    s_k.shuffle();
    // a few repeated keys back to back, so that the CAM has to hold them
    for (int i = 0; i < 10; i++) begin s_k.push_back(distinct[i * 7]); s_k.push_back(distinct[i * 7]); end
    foreach (s_k[i]) begin s_v.push_back($urandom); s_map[s_k[i]].push_back(s_v[i]); end

    // ---- T
    for (int i = 0; i < 3000; i++) begin
      key_t k;
      case ($urandom_range(6))
        0, 1, 2: k = distinct[$urandom_range(distinct.size() - 1)];
        3:       k = t_k.size() ? t_k[t_k.size() - 1] : distinct[0];
        4:       k = coll_b[30 + $urandom_range(9)];
        5:       k = line_b[$urandom_range(19)];
        default: k = $urandom;
      endcase
      t_k.push_back(k);
      t_v.push_back($urandom);
    end
    foreach (t_k[i])
      if (s_map.exists(t_k[i]))
        foreach (s_map[t_k[i]][j]) expct[{t_k[i], s_map[t_k[i]][j], t_v[i]}]++;
    n_exp = 0;
    foreach (expct[r]) n_exp += expct[r];

    foreach (s_k[i]) u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({s_k[i], s_v[i]}));
    foreach (t_k[i]) u_mem.poke(T_BASE + DDR_AW'(i), DDR_DW'({t_k[i], t_v[i]}));

    #20 hrst_n = 1; rst_n = 1;

    // ---- build
    host_run(OP_BUILD, AGG_SUM, S_BASE, s_k.size(), '0, st);
    $display("build: rows %0d, cache lookups %0d, hash table lookups %0d, collisions %0d, repetitive %0d",
             s_k.size(), st.stats.cache_lookups, st.stats.ht_lookups, st.stats.collisions, st.stats.repetitive);
    check("build: status op", st.op == OP_BUILD);
    check("build: not full", !st.ht_full);
    check("build: one cache lookup per row at least", st.stats.cache_lookups >= s_k.size());
    check("build: collisions", st.stats.collisions > 0);
    check("build: repetitive keys", st.stats.repetitive > 0);

    // ---- probe
    host_run(OP_PROBE, AGG_SUM, T_BASE, t_k.size(), R_BASE, st);
    $display("probe: rows %0d, cache lookups %0d, hash table lookups %0d, collisions %0d, repetitive %0d, result rows %0d",
             t_k.size(), st.stats.cache_lookups, st.stats.ht_lookups, st.stats.collisions, st.stats.repetitive, st.out_rows);
    check($sformatf("probe: %0d result rows, expected %0d", st.out_rows, n_exp), st.out_rows == n_exp);
    begin
      int got [logic [95:0]];
      for (int i = 0; i < st.out_rows; i++) got[u_mem.peek(R_BASE + DDR_AW'(i))]++;
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
    check("probe: cache hits", st.stats.cache_lookups > st.stats.ht_lookups);
    check("probe: collisions", st.stats.collisions > 0);
    check("probe: repetitive", st.stats.repetitive > 0);

    // ---- group-by SUM on a cleared hash table
    begin
      val_t ref_agg [key_t];
      key_t gk[$];
      foreach (triple[i]) gk.push_back(triple[i]);
      for (int i = 0; i < 10; i++) begin gk.push_back(coll_a[i]); gk.push_back(coll_b[i]); end
      for (int i = 0; i < 30; i++) gk.push_back($urandom);
      for (int i = 0; i < 2000; i++) begin
        key_t k;
        val_t v;
        k = gk[$urandom_range(gk.size() - 1)];
        v = $urandom_range(1000000);
        g_k.push_back(k); g_v.push_back(v);
        if (!ref_agg.exists(k)) ref_agg[k] = v; else ref_agg[k] = ref_agg[k] + v;
        u_mem.poke(G_BASE + DDR_AW'(i), DDR_DW'({k, v}));
      end
      // the host clears the hash table area
      begin
        logic [DDR_AW-1:0] ht_words[$];
        foreach (u_mem.mem[w]) if (w < (DDR_AW'(1) << HT_IDX_W)) ht_words.push_back(w);
        foreach (ht_words[i]) u_mem.mem.delete(ht_words[i]);
      end
      host_run(OP_GROUPBY, AGG_SUM, G_BASE, g_k.size(), '0, st);
      $display("group-by: rows %0d, groups %0d, cache lookups %0d, hash table lookups %0d, collisions %0d, aggregations %0d",
               g_k.size(), ref_agg.size(), st.stats.cache_lookups, st.stats.ht_lookups, st.stats.collisions, st.stats.repetitive);
      check("group-by: status op", st.op == OP_GROUPBY);
      foreach (ref_agg[k]) begin
        entry_t e;
        checks++;
        if (!walk(k, e) || e.value != ref_agg[k]) begin
          failures++;
          $display("FAIL: group %h: value %0d expected %0d", k, e.value, ref_agg[k]);
        end
      end
      check("group-by: hit ratio above 90%", st.stats.ht_lookups * 10 < st.stats.cache_lookups);
    end

    $display("mechanisms: cache hits %0d, misses %0d, tag mismatches %0d, CAM stalls %0d, write-through %0d, result stalls %0d",
             n_hit, n_miss, n_tag_miss, n_cam_stall, n_wt, n_res_stall);
    check("cache hit happened", n_hit > 0);
    check("cache miss happened", n_miss > 0);
    check("tag mismatch happened", n_tag_miss > 0);
    check("CAM stall happened", n_cam_stall > 0);
    check("write-through happened", n_wt > 0);
    check("result write waited for the memory port", n_res_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
