// ht_cache_tb: checks the flush sweep length, one-cycle read latency,
// direct-mapped replacement, tag comparison (false positives read as
// misses) and invalid lines, against a model of the lines.
module ht_cache_tb;
  import ht_pkg::*;
  localparam int CW = 4;
  logic clk = 0, rst_n = 0, flush = 0, init_busy;
  logic rd_en = 0, rd_valid, rd_hit, wr_en = 0;
  ht_idx_t rd_addr, wr_addr;
  entry_t rd_entry, wr_entry;
  int checks = 0, failures = 0;
  // model: per line, address stored and entry
  ht_idx_t m_addr [1 << CW];
  entry_t  m_ent  [1 << CW];
  logic    m_v    [1 << CW];

  ht_cache #(.CACHE_IDX_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_cycles;
  initial begin
    for (int i = 0; i < (1 << CW); i++) m_v[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    busy_cycles = 0;
    while (init_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != (1 << CW)) begin failures++; $display("flush took %0d cycles", busy_cycles); end
    for (int i = 0; i < 3000; i++) begin
      ht_idx_t a;
      int l;
      @(negedge clk);
      // few distinct addresses so that hits, tag misses and refills all occur
      a = ht_idx_t'($urandom_range(63)) | (ht_idx_t'($urandom_range(3)) << 20);
      wr_en = ($urandom_range(2) == 0);
      rd_en = !wr_en;
      if (wr_en) begin
        wr_addr  = a;
        wr_entry = entry_t'({$urandom, $urandom, $urandom, $urandom});
        wr_entry.valid = ($urandom_range(7) != 0);
        @(negedge clk);
        l = int'(a[CW-1:0]);
        m_addr[l] = a; m_ent[l] = wr_entry; m_v[l] = 1;
      end else begin
        logic exp_hit;
        entry_t exp_e;
        rd_addr = a;
        l = int'(a[CW-1:0]);
        exp_hit = m_v[l] && m_addr[l] == a && m_ent[l].valid;
        exp_e = m_ent[l];
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (!rd_valid || rd_hit !== exp_hit || (exp_hit && rd_entry !== exp_e)) begin
          failures++;
          $display("read %h: valid %0b hit %0b exp %0b", a, rd_valid, rd_hit, exp_hit);
        end
      end
      wr_en = 0;
    end
    // flush clears everything
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    while (init_busy) @(negedge clk);
    for (int i = 0; i < (1 << CW); i++) begin
      rd_en = 1; rd_addr = m_v[i] ? m_addr[i] : ht_idx_t'(i);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_hit) begin failures++; $display("hit after flush line %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
