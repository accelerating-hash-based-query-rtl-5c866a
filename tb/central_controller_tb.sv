// central_controller_tb: the controller with a hash engine (256-line cache)
// and the behavioural memory. Runs a build and a probe through the command
// interface and checks the status records (operation, result row count,
// statistics), the result rows written to memory (reference join, as a
// multiset, at consecutive words from dst_base), that the hash table is
// placed at HT_BASE, that row fetches and result writes share the memory
// port with the engine, and that a second command waits until the first
// has finished.
module central_controller_tb;
  import ht_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [DDR_AW-1:0] HTB    = 28'h200_0000;
  localparam logic [DDR_AW-1:0] S_BASE = 28'h010_0000;
  localparam logic [DDR_AW-1:0] T_BASE = 28'h020_0000;
  localparam logic [DDR_AW-1:0] R_BASE = 28'h030_0000;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, sts_valid;
  cmd_t cmd;
  status_t sts;
  op_e eng_mode;
  agg_e eng_agg;
  logic eng_onchip;
  logic eng_start, eng_busy, eng_ht_full;
  stats_t eng_stats;
  logic eng_in_valid, eng_in_ready, eng_out_valid, eng_out_ready;
  key_t eng_in_key;
  val_t eng_in_value;
  join_row_t eng_out_row;
  logic eng_req_valid, eng_req_ready, eng_req_we, eng_rsp_valid;
  ht_idx_t eng_req_addr;
  entry_t eng_req_wdata, eng_rsp_data;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [DDR_AW-1:0] mem_req_addr;
  logic [DDR_DW-1:0] mem_req_wdata, mem_rsp_data;

  int checks = 0, failures = 0;

  central_controller #(.HT_BASE(HTB)) dut (.*);

  hash_engine #(.CACHE_IDX_W(8)) u_eng (
    .clk, .rst_n, .mode(eng_mode), .agg(eng_agg), .onchip(eng_onchip), .start(eng_start), .busy(eng_busy),
    .ht_full(eng_ht_full), .stats(eng_stats),
    .in_valid(eng_in_valid), .in_ready(eng_in_ready), .in_key(eng_in_key), .in_value(eng_in_value),
    .out_valid(eng_out_valid), .out_ready(eng_out_ready), .out_row(eng_out_row),
    .ht_req_valid(eng_req_valid), .ht_req_ready(eng_req_ready), .ht_req_we(eng_req_we),
    .ht_req_addr(eng_req_addr), .ht_req_wdata(eng_req_wdata),
    .ht_rsp_valid(eng_rsp_valid), .ht_rsp_data(eng_rsp_data));

  ddr3_model #(.AW(DDR_AW), .DW(DDR_DW), .LATENCY(30), .READY_PCT(85)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ht_outside = 0, n_share = 0;
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    if (dut.g_eng && (mem_req_addr < HTB || mem_req_addr >= HTB + (DDR_AW'(1) << HT_IDX_W))) n_ht_outside++;
    if (dut.want_fetch && !dut.g_fetch) n_share++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  status_t sq[$];
  always @(posedge clk) if (rst_n && sts_valid) sq.push_back(sts);

  key_t s_k[$], t_k[$];
  val_t s_v[$], t_v[$];
  val_t s_map [key_t][$];
  int   expct [logic [95:0]];

  initial begin
    int n_exp;
    int t_issue2;
    search_collisions(100000);
    for (int i = 0; i < 200; i++) begin
      key_t k;
      k = (i < 20) ? coll_a[i] : (i < 40) ? coll_b[i - 20] : (i % 3 == 0 && i > 40) ? s_k[i - 3] : $urandom;
      s_k.push_back(k); s_v.push_back($urandom);
      s_map[k].push_back(s_v[i]);
      u_mem.poke(S_BASE + DDR_AW'(i), DDR_DW'({k, s_v[i]}));
    end
    for (int i = 0; i < 500; i++) begin
      key_t k;
      k = ($urandom_range(3) != 0) ? s_k[$urandom_range(199)] : $urandom;
      t_k.push_back(k); t_v.push_back($urandom);
      u_mem.poke(T_BASE + DDR_AW'(i), DDR_DW'({k, t_v[i]}));
      if (s_map.exists(k)) foreach (s_map[k][j]) expct[{k, s_map[k][j], t_v[i]}]++;
    end
    n_exp = 0;
    foreach (expct[r]) n_exp += expct[r];

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // build, and the probe issued right behind it
    cmd = '{op: OP_BUILD, agg: AGG_SUM, onchip: 1'b0, src_base: S_BASE, n_rows: 200, dst_base: '0};
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd = '{op: OP_PROBE, agg: AGG_SUM, onchip: 1'b0, src_base: T_BASE, n_rows: 500, dst_base: R_BASE};
    check("command not taken while busy", !cmd_ready);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    t_issue2 = int'(eng_busy);
    @(negedge clk) cmd_valid = 0;
    check("second command taken only with the engine idle", t_issue2 == 0);
    while (sq.size() < 2) @(negedge clk);

    check("build status", sq[0].op == OP_BUILD && sq[0].out_rows == 0 && !sq[0].ht_full);
    check("build statistics", sq[0].stats.cache_lookups >= 200 && sq[0].stats.collisions > 0
                              && sq[0].stats.repetitive > 0);
    check($sformatf("probe rows %0d expected %0d", sq[1].out_rows, n_exp), sq[1].op == OP_PROBE && sq[1].out_rows == n_exp);
    begin
      int got [logic [95:0]];
      for (int i = 0; i < sq[1].out_rows; i++) got[u_mem.peek(R_BASE + DDR_AW'(i))]++;
      foreach (expct[r]) begin
        checks++;
        if (!got.exists(r) || got[r] != expct[r]) begin
          failures++; $display("FAIL: row %h expected %0d got %0d", r, expct[r], got.exists(r) ? got[r] : 0);
        end
      end
    end
    check("hash table words stay inside HT_BASE..", n_ht_outside == 0);
    check("row fetch waited for another requester", n_share > 0);
    check("hash table written at HT_BASE", u_mem.peek(HTB + DDR_AW'(ref_hash(s_k[50]))) != '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
