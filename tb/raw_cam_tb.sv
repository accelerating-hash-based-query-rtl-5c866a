// raw_cam_tb: directed test of slot allocation, index matching, the check
// enable, and release only after retirement and all queued writes; then a
// random phase of 3000 cycles (allocations, retirements, write pushes and
// completions on both write queues, in any combination per cycle) in which
// match, any_free, free_slot and busy_count are compared every cycle with a
// model of the slots kept here.
module raw_cam_tb;
  import ht_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic check = 1, match, any_free, alloc = 0, retire = 0;
  ht_idx_t lookup_idx, alloc_idx;
  slot_t free_slot, retire_slot;
  logic [1:0] wq_push = 0, wq_done = 0;
  slot_t wq_push_slot [2], wq_done_slot [2];
  logic [$clog2(N+1)-1:0] busy_count;
  int checks = 0, failures = 0;

  raw_cam #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0b expected %0b", what, got, exp); end
  endtask

  task automatic do_alloc(ht_idx_t idx, output slot_t s);
    @(negedge clk);
    alloc_idx = idx;
    s = free_slot;
    alloc = 1;
    @(negedge clk) alloc = 0;
  endtask

  slot_t s0, s1, s2, s3;
  logic    m_busy [N] = '{default: 0};
  logic    m_ret  [N] = '{default: 0};
  ht_idx_t m_idx  [N];
  int      m_pend [N] = '{default: 0};
  initial begin
    wq_push_slot[0] = 0; wq_push_slot[1] = 0; wq_done_slot[0] = 0; wq_done_slot[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect1("free after reset", any_free, 1);
    do_alloc(24'h000123, s0);
    do_alloc(24'h000456, s1);
    checks++; if (s0 == s1) begin failures++; $display("same slot twice"); end
    lookup_idx = 24'h000123;
    #1 expect1("match busy index", match, 1);
    check = 0;
    #1 expect1("no match when check is off", match, 0);
    check = 1;
    lookup_idx = 24'h000789;
    #1 expect1("no match other index", match, 0);
    // s0 queues two writes (cache and table) in one cycle, then retires
    @(negedge clk);
    wq_push = 2'b11; wq_push_slot[0] = s0; wq_push_slot[1] = s0;
    @(negedge clk);
    wq_push = 2'b00;
    retire = 1; retire_slot = s0;
    @(negedge clk) retire = 0;
    lookup_idx = 24'h000123;
    #1 expect1("held while writes pending", match, 1);
    // one write done
    wq_done = 2'b01; wq_done_slot[0] = s0;
    @(negedge clk) wq_done = 2'b00;
    #1 expect1("held while one write pending", match, 1);
    wq_done = 2'b10; wq_done_slot[1] = s0;
    @(negedge clk) wq_done = 2'b00;
    #1 expect1("released after last write", match, 0);
    checks++; if (busy_count != 1) begin failures++; $display("busy_count %0d exp 1", busy_count); end
    // a retire without pending writes releases at once; push and done in the same cycle
    @(negedge clk);
    wq_push = 2'b01; wq_push_slot[0] = s1; wq_done = 2'b00;
    @(negedge clk);
    wq_push = 2'b01; wq_push_slot[0] = s1;
    wq_done = 2'b01; wq_done_slot[0] = s1;
    retire = 1; retire_slot = s1;
    @(negedge clk);
    wq_push = 0; retire = 0;
    wq_done = 2'b01; wq_done_slot[0] = s1;
    lookup_idx = 24'h000456;
    #1 expect1("s1 held", match, 1);
    @(negedge clk) wq_done = 0;
    #1 expect1("s1 released", match, 0);
    // fill all slots
    do_alloc(24'h1, s0); do_alloc(24'h2, s1); do_alloc(24'h3, s2); do_alloc(24'h4, s3);
    expect1("full", any_free, 0);
    checks++; if (busy_count != N) begin failures++; $display("busy_count %0d exp %0d", busy_count, N); end
    @(negedge clk) begin retire = 1; retire_slot = s2; end
    @(negedge clk) retire = 0;
    expect1("free after retire", any_free, 1);
    checks++; if (free_slot != s2) begin failures++; $display("free slot %0d exp %0d", free_slot, s2); end

    // ---- random phase against a model
    rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int nb, f;
      int dpend [N];
      @(negedge clk);
      // model outputs
      nb = 0; f = -1;
      for (int i = N - 1; i >= 0; i--) if (!m_busy[i]) f = i;
      foreach (m_busy[i]) nb += int'(m_busy[i]);
      // stimulus
      lookup_idx = ht_idx_t'($urandom_range(7));
      check = ($urandom_range(7) != 0);
      alloc = (f >= 0) && any_free && ($urandom_range(2) == 0);
      alloc_idx = ht_idx_t'($urandom_range(7));
      retire = 0; wq_push = 0; wq_done = 0;
      foreach (dpend[i]) dpend[i] = m_pend[i];
      for (int j = 0; j < 2; j++) begin
        int sl;
        sl = $urandom_range(N - 1);
        if (m_busy[sl] && !m_ret[sl] && $urandom_range(2) == 0) begin
          wq_push[j] = 1; wq_push_slot[j] = slot_t'(sl);
        end
        sl = $urandom_range(N - 1);
        if (m_busy[sl] && dpend[sl] > 0 && $urandom_range(1) == 0) begin
          wq_done[j] = 1; wq_done_slot[j] = slot_t'(sl); dpend[sl]--;
        end
      end
      begin
        int sl;
        sl = $urandom_range(N - 1);
        if (m_busy[sl] && !m_ret[sl] && $urandom_range(3) == 0) begin retire = 1; retire_slot = slot_t'(sl); end
      end
      #1;
      checks++;
      if (any_free != (f >= 0) || (f >= 0 && free_slot != slot_t'(f)) || busy_count != nb) begin
        failures++;
        $display("cycle %0d: any_free %0b free_slot %0d busy %0d, model %0d %0d", cyc, any_free, free_slot, busy_count, f, nb);
      end
      begin
        logic mm;
        mm = 0;
        foreach (m_busy[i]) if (m_busy[i] && m_idx[i] == lookup_idx) mm = check;
        checks++;
        if (match != mm) begin failures++; $display("cycle %0d: match %0b model %0b", cyc, match, mm); end
      end
      // model update at the coming edge
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (alloc && i == f) begin
          m_busy[i] = 1; m_ret[i] = 0; m_idx[i] = alloc_idx; m_pend[i] = 0;
        end else if (m_busy[i]) begin
          for (int j = 0; j < 2; j++) begin
            if (wq_push[j] && wq_push_slot[j] == slot_t'(i)) m_pend[i]++;
            if (wq_done[j] && wq_done_slot[j] == slot_t'(i)) m_pend[i]--;
          end
          if (retire && retire_slot == slot_t'(i)) m_ret[i] = 1;
          if (m_ret[i] && m_pend[i] == 0) begin m_busy[i] = 0; m_ret[i] = 0; end
        end
      end
    end
    alloc = 0; retire = 0; wq_push = 0; wq_done = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
