// tpch_workload_tb: the whole accelerator at its default sizes, run on
// table shapes of TPC-H query kernels at the 10 GB scale:
//   - Q14 join: build of 0.7M rows with distinct (primary) keys, then a
//     probe of 2M rows, 90% of them with a key of the build side;
//   - Q04 group-by: 0.52M rows into 5 groups (SUM);
//   - Q03 group-by: 0.3M rows into 100K groups (SUM);
//   - Q12 group-by: 0.31M rows into 2 groups, Q13 group-by: 1.5M rows into
//     40 groups (these group counts are assumed; the published table only
//     shows that nearly every lookup hits);
//   - Q13 build: 1.5M rows with distinct keys, the largest build side;
//   - Q12 join: build of 0.3M rows and a full-size probe of 15M rows, both
//     with primary keys (every probe key distinct, 0.3M of them matching);
//   - Q14 join at the 1 GB scale (a tenth of the rows, 70K and 200K) in
//     on-chip mode, where the cache holds the whole hash table; no hash
//     table read may reach memory.
// The 10 GB row counts and group counts are those of the published
// evaluation of this kind of engine (the 1 GB ones are scaled from them); the key and value contents are generated here
// (random 32-bit keys, distinct on the build side; random values), so the
// statistics can only be compared in trend, not in their exact values.
// Checks: after the build every key is found in the hash table in memory
// with its value; after the probe the status row count equals the reference
// and every result row holds the build value of its key, and the result
// table as a whole equals the reference (count and a sum of mixed (k, v_T)
// pairs); after each group-by every group is found with its sum. It also
// checks the cache behaviour the table shapes imply: a low hit ratio for
// the build with primary keys, a full hit ratio when the groups fit in the
// cache. It prints rows, cache and hash table lookups, collisions and hit
// ratio per phase, and the cycles per row.
module tpch_workload_tb;
  import ht_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [DDR_AW-1:0] S_BASE = 28'h100_0000;
  localparam logic [DDR_AW-1:0] T_BASE = 28'h110_0000;
  localparam logic [DDR_AW-1:0] R_BASE = 28'h140_0000;
  localparam logic [DDR_AW-1:0] G_BASE = 28'h170_0000;
  localparam int LAT = 30;

  localparam int N_S = 700_000, N_T = 2_000_000;
  localparam int M_S = N_S / 10, M_T = N_T / 10;   // 1 GB scale
  localparam int Q_S = 300_000, Q_T = 15_000_000;  // Q12 join
  localparam key_t Q_MUL = 32'h9E37_79B1;         // odd: (j+1)*Q_MUL is one-to-one
  localparam logic [DDR_AW-1:0] Q_T_BASE = 28'h200_0000;
  localparam logic [DDR_AW-1:0] Q_R_BASE = 28'h300_0000;

  logic hclk = 0, clk = 0, hrst_n = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_cmd_ready, host_sts_valid, host_sts_ready = 0;
  cmd_t host_cmd;
  status_t host_sts;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [DDR_AW-1:0] mem_req_addr;
  logic [DDR_DW-1:0] mem_req_wdata, mem_rsp_data;

  int checks = 0, failures = 0;
  logic onchip_mode = 1'b0;   // hash table held in the cache only
  longint cycles = 0;

  accel_top dut (.*);

  ddr3_model #(.AW(DDR_AW), .DW(DDR_DW), .LATENCY(LAT), .READY_PCT(100)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  always #3.333 hclk = ~hclk;
  always #2.5   clk  = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host_run(string name, op_e op, agg_e agg, logic [DDR_AW-1:0] src, int n,
                          logic [DDR_AW-1:0] dst, output status_t s);
    longint c0;
    @(negedge hclk);
    host_cmd = '{op: op, agg: agg, onchip: onchip_mode, src_base: src, n_rows: n, dst_base: dst};
    host_cmd_valid = 1;
    c0 = cycles;
    @(posedge hclk);
    while (!host_cmd_ready) @(posedge hclk);
    @(negedge hclk) host_cmd_valid = 0;
    while (!host_sts_valid) @(negedge hclk);
    s = host_sts;
    host_sts_ready = 1;
    @(negedge hclk) host_sts_ready = 0;
    $display("%-12s rows %8d  cache lookups %8d  ht lookups %8d  collisions %7d  H.R %5.1f%%  cycles/row %5.2f",
             name, n, s.stats.cache_lookups, s.stats.ht_lookups, s.stats.collisions,
             100.0 * (1.0 - real'(s.stats.ht_lookups) / real'(s.stats.cache_lookups)),
             real'(cycles - c0) / real'(n));
    check({name, ": status op"}, s.op == op);
    check({name, ": hash table not full"}, !s.ht_full);
    check({name, ": every row looked up in the cache"}, s.stats.cache_lookups >= n);
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

  // order-independent fingerprint of a (key, v_T) pair
  function automatic longint unsigned mix(key_t k, val_t v);
    longint unsigned x;
    x = {k, v} * 64'h9E37_79B9_7F4A_7C15;
    return x ^ (x >> 29);
  endfunction

  task automatic clear_hash_table();
    logic [DDR_AW-1:0] ht_words[$];
    foreach (u_mem.mem[w]) if (w < (DDR_AW'(1) << HT_IDX_W)) ht_words.push_back(w);
    foreach (ht_words[i]) u_mem.mem.delete(ht_words[i]);
  endtask

  function automatic int ht_entries();
    int n = 0;
    foreach (u_mem.mem[w]) if (w < (DDR_AW'(1) << HT_IDX_W)) n++;
    return n;
  endfunction

  task automatic group_by(string name, int rows, int groups);
    val_t ref_sum [key_t];
    key_t gk [];
    status_t st;
    int bad = 0;
    gk = new[groups];
    foreach (gk[i]) gk[i] = key_t'(i + 1);
    gk.shuffle();
    for (int i = 0; i < rows; i++) begin
      key_t k;
      val_t v;
      k = (i < groups) ? gk[i] : gk[$urandom_range(groups - 1)];
      v = $urandom_range(1000);
      ref_sum[k] = ref_sum.exists(k) ? ref_sum[k] + v : v;
      u_mem.poke(G_BASE + DDR_AW'(i), DDR_DW'({k, v}));
    end
    clear_hash_table();
    host_run(name, OP_GROUPBY, AGG_SUM, G_BASE, rows, '0, st);
    foreach (ref_sum[k]) begin
      entry_t e;
      if (!walk(k, e) || e.value != ref_sum[k]) bad++;
    end
    check({name, ": every group found with its sum"}, bad == 0);
    if (bad != 0) $display("  %0d groups wrong", bad);
    check({name, ": entries in the hash table = groups"}, ht_entries() == groups);
    if (groups <= (1 << 18) / 8) check({name, ": groups fit in the cache, hit ratio above 99%"},
                                       st.stats.ht_lookups * 100 < st.stats.cache_lookups);
    else check({name, ": hit ratio above 50%"}, st.stats.ht_lookups * 2 < st.stats.cache_lookups);
  endtask

  initial begin
    status_t st;
    key_t s_k [];
    val_t s_v [];
    int   in_s [key_t];   // row of each S key
    int unsigned n_exp = 0, bad = 0;
    longint unsigned sum_exp = 0, sum_got = 0;

    // ---- Q14 join: S has N_S distinct random keys (never 0)
    s_k = new[N_S];
    s_v = new[N_S];
    foreach (s_k[i]) begin
      key_t k;
      do k = $urandom; while (k == 0 || in_s.exists(k));
      in_s[k] = i;
      s_k[i] = k;
    end
    foreach (s_k[i]) begin
      s_v[i] = $urandom;
      u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({s_k[i], s_v[i]}));
    end
    for (int i = 0; i < N_T; i++) begin
      key_t k;
      val_t v;
      if ($urandom_range(9) == 0) do k = $urandom; while (in_s.exists(k));
      else k = s_k[$urandom_range(N_S - 1)];
      v = $urandom;
      if (in_s.exists(k)) begin n_exp++; sum_exp += mix(k, v); end
      u_mem.poke(T_BASE + DDR_AW'(i), DDR_DW'({k, v}));
    end

    #20 hrst_n = 1; rst_n = 1;

    host_run("Q14 build", OP_BUILD, AGG_SUM, S_BASE, N_S, '0, st);
    foreach (s_k[i]) begin
      entry_t e;
      if (!walk(s_k[i], e) || e.value != s_v[i] || e.ptr_r != '0) bad++;
    end
    check("Q14 build: every key stored once with its value", bad == 0);
    check("Q14 build: primary keys, hit ratio below 50%", st.stats.ht_lookups * 2 > st.stats.cache_lookups);
    check("Q14 build: collisions chained", st.stats.collisions > 0);

    begin
      host_run("Q14 probe", OP_PROBE, AGG_SUM, T_BASE, N_T, R_BASE, st);
      check("Q14 probe: result row count", st.out_rows == n_exp);
      bad = 0;
      for (int i = 0; i < int'(st.out_rows); i++) begin
        join_row_t r;
        r = join_row_t'(u_mem.peek(R_BASE + DDR_AW'(i)));
        if (!in_s.exists(r.key) || r.v_s != s_v[in_s[r.key]]) bad++;
        else sum_got += mix(r.key, r.v_t);
      end
      check("Q14 probe: every result row holds the build value of its key", bad == 0);
      check("Q14 probe: result table equals the reference", sum_got == sum_exp);
    end
    s_k.delete();
    s_v.delete();
    in_s.delete();

    // ---- group-by kernels
    group_by("Q04 groupby", 520_000, 5);
    group_by("Q03 groupby", 300_000, 100_000);
    group_by("Q12 groupby", 310_000, 2);
    group_by("Q13 groupby", 1_500_000, 40);

    // ---- the largest build side (Q13, 1.5M rows): every key stored
    begin
      key_t b_k [] = new[1_500_000];
      val_t b_v [] = new[1_500_000];
      foreach (b_k[i]) begin
        key_t k;
        do k = $urandom; while (k == 0 || in_s.exists(k));
        in_s[k] = i;
        b_k[i] = k;
        b_v[i] = $urandom;
        u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({k, b_v[i]}));
      end
      clear_hash_table();
      host_run("Q13 build", OP_BUILD, AGG_SUM, S_BASE, b_k.size(), '0, st);
      bad = 0;
      foreach (b_k[i]) begin
        entry_t e;
        if (!walk(b_k[i], e) || e.value != b_v[i] || e.ptr_r != '0) bad++;
      end
      check("Q13 build: every key stored once with its value", bad == 0);
      in_s.delete();
    end

    // ---- Q14 join at the 1 GB scale with the hash table held on chip
    begin
      int unsigned m_exp = 0;
      longint unsigned m_sum_exp = 0, m_sum_got = 0;
      s_k = new[M_S];
      s_v = new[M_S];
      foreach (s_k[i]) begin
        key_t k;
        do k = $urandom; while (k == 0 || in_s.exists(k));
        in_s[k] = i;
        s_k[i] = k;
        s_v[i] = $urandom;
        u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({s_k[i], s_v[i]}));
      end
      for (int i = 0; i < M_T; i++) begin
        key_t k;
        val_t v;
        if ($urandom_range(9) == 0) do k = $urandom; while (in_s.exists(k));
        else k = s_k[$urandom_range(M_S - 1)];
        v = $urandom;
        if (in_s.exists(k)) begin m_exp++; m_sum_exp += mix(k, v); end
        u_mem.poke(T_BASE + DDR_AW'(i), DDR_DW'({k, v}));
      end
      clear_hash_table();
      onchip_mode = 1'b1;
      host_run("Q14 1GB bld", OP_BUILD, AGG_SUM, S_BASE, M_S, '0, st);
      check("Q14 1GB build: no hash table reads", st.stats.ht_lookups == 0);
      host_run("Q14 1GB prb", OP_PROBE, AGG_SUM, T_BASE, M_T, R_BASE, st);
      onchip_mode = 1'b0;
      check("Q14 1GB probe: no hash table reads", st.stats.ht_lookups == 0);
      check("Q14 1GB probe: result row count", st.out_rows == m_exp);
      bad = 0;
      for (int i = 0; i < int'(st.out_rows); i++) begin
        join_row_t r;
        r = join_row_t'(u_mem.peek(R_BASE + DDR_AW'(i)));
        if (!in_s.exists(r.key) || r.v_s != s_v[in_s[r.key]]) bad++;
        else m_sum_got += mix(r.key, r.v_t);
      end
      check("Q14 1GB probe: every result row holds the build value of its key", bad == 0);
      check("Q14 1GB probe: result table equals the reference", m_sum_got == m_sum_exp);
    end

    // ---- Q12 join: build of 0.3M primary keys, probe of 15M primary keys.
    // Probe row j has key (j+1)*Q_MUL, distinct for every j; build row i
    // takes the key of one probe row among rows 50i..50i+49.
    begin
      int unsigned q_exp = 0;
      longint unsigned q_sum_exp = 0, q_sum_got = 0;
      int unsigned pick [];
      pick = new[Q_S];
      u_mem.mem.delete();
      in_s.delete();
      s_k = new[Q_S];
      s_v = new[Q_S];
      foreach (s_k[i]) begin
        pick[i] = 50 * i + $urandom_range(49);
        s_k[i] = key_t'(pick[i] + 1) * Q_MUL;
        s_v[i] = $urandom;
        in_s[s_k[i]] = i;
        u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({s_k[i], s_v[i]}));
      end
      for (int j = 0; j < Q_T; j++) begin
        key_t k;
        val_t v;
        k = key_t'(j + 1) * Q_MUL;
        v = $urandom;
        if (in_s.exists(k)) begin q_exp++; q_sum_exp += mix(k, v); end
        u_mem.poke(Q_T_BASE + DDR_AW'(j), DDR_DW'({k, v}));
      end
      host_run("Q12 build", OP_BUILD, AGG_SUM, S_BASE, Q_S, '0, st);
      bad = 0;
      foreach (s_k[i]) begin
        entry_t e;
        if (!walk(s_k[i], e) || e.value != s_v[i] || e.ptr_r != '0) bad++;
      end
      check("Q12 build: every key stored once with its value", bad == 0);
      host_run("Q12 probe", OP_PROBE, AGG_SUM, Q_T_BASE, Q_T, Q_R_BASE, st);
      check("Q12 probe: result row count", st.out_rows == q_exp && q_exp == Q_S);
      bad = 0;
      for (int i = 0; i < int'(st.out_rows); i++) begin
        join_row_t r;
        r = join_row_t'(u_mem.peek(Q_R_BASE + DDR_AW'(i)));
        if (!in_s.exists(r.key) || r.v_s != s_v[in_s[r.key]]) bad++;
        else q_sum_got += mix(r.key, r.v_t);
      end
      check("Q12 probe: every result row holds the build value of its key", bad == 0);
      check("Q12 probe: result table equals the reference", q_sum_got == q_sum_exp);
      check("Q12 probe: primary keys, hit ratio below 50%", st.stats.ht_lookups * 2 > st.stats.cache_lookups);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
