// lfsr_hash_tb: checks the pipelined hash against the bit-serial reference,
// the latency of STAGES cycles, one key per cycle, and stalls.
module lfsr_hash_tb;
  import tb_ref_pkg::*;
  localparam int STAGES = 4;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [31:0] in_key, out_key;
  logic [31:0] in_pay, out_pay;
  logic [22:0] out_hash;
  logic out_valid;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] exp_q[$];
  int          t_in[$];

  lfsr_hash #(.KEY_W(32), .HASH_W(23), .PAYLOAD_W(32), .STAGES(STAGES)) dut (
    .clk, .rst_n, .en, .in_valid, .in_key, .in_payload(in_pay),
    .out_valid, .out_hash, .out_key, .out_payload(out_pay));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall_cycles = 0, n_out = 0;
  always @(posedge clk) if (rst_n && en && out_valid) begin
    logic [31:0] k;
    int t0;
    k  = exp_q.pop_front();
    t0 = t_in.pop_front();
    checks++;
    if (out_key !== k || out_pay !== ~k || out_hash !== ref_hash(k)) begin
      failures++;
      $display("hash mismatch key %h: got %h exp %h", k, out_hash, ref_hash(k));
    end
    n_out++;
    if (stall_cycles == 0) begin
      checks++;
      if (cyc - t0 != STAGES) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t0, STAGES);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: one key per cycle, no stall
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_key   = (i < 4) ? i : $urandom;
      in_pay   = ~in_key;
      @(posedge clk);
      exp_q.push_back(in_key);
      t_in.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 2) @(posedge clk);
    checks++;
    if (n_out != 500) begin failures++; $display("got %0d outputs, expected 500 (one per cycle)", n_out); end
    // phase 2: random stalls
    stall_cycles = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en       = ($urandom_range(3) != 0);
      in_valid = ($urandom_range(1) != 0);
      in_key   = $urandom;
      in_pay   = ~in_key;
      @(posedge clk);
      if (en && in_valid) begin exp_q.push_back(in_key); t_in.push_back(cyc); end
    end
    @(negedge clk) begin in_valid = 0; en = 1; end
    repeat (STAGES + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d keys lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
