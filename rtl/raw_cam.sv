// raw_cam: content addressable memory of the hash indexes in flight.
//
// It removes read-after-write hazards on the hash table: every request that
// enters the engine takes a slot holding its hash index (the head of its
// chain). While `check` is set (build and group-by, the phases that write),
// a new key whose hash index matches a busy slot is held back (`match`)
// until that slot is free, so two requests never walk and modify the same
// chain at once. A slot is free again when its request has retired and every
// write it queued (to the cache and to the hash table) has been performed:
// each write queued counts up the slot's pending counter, each write
// performed counts it down. Up to two writes may be queued and two performed
// per cycle (one cache and one hash table write each).
// `alloc` takes the lowest free slot, given on `free_slot` when `any_free`.
// The use of a CAM against read-after-write hazards follows the design
// description; slot count, release rule and interface are this design's.
module raw_cam
  import ht_pkg::*;
#(
  parameter int N = NTOK
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup of a new key
  input  logic          check,
  input  ht_idx_t       lookup_idx,
  output logic          match,
  // allocation
  output logic          any_free,
  output slot_t         free_slot,
  input  logic          alloc,
  input  ht_idx_t       alloc_idx,
  // request retired
  input  logic          retire,
  input  slot_t         retire_slot,
  // writes queued / performed
  input  logic [1:0]    wq_push,
  input  slot_t         wq_push_slot [2],
  input  logic [1:0]    wq_done,
  input  slot_t         wq_done_slot [2],
  output logic [$clog2(N+1)-1:0] busy_count
);
  logic    busy    [N];
  logic    retired [N];
  ht_idx_t idx     [N];
  logic [4:0] pend [N];

  always_comb begin
    match = 1'b0;
    for (int i = 0; i < N; i++)
      if (busy[i] && idx[i] == lookup_idx) match = check;
  end

  always_comb begin
    any_free  = 1'b0;
    free_slot = '0;
    for (int i = N - 1; i >= 0; i--)
      if (!busy[i]) begin
        any_free  = 1'b1;
        free_slot = slot_t'(i);
      end
  end

  always_comb begin
    busy_count = '0;
    for (int i = 0; i < N; i++) busy_count += {{($clog2(N+1)-1){1'b0}}, busy[i]};
  end

  for (genvar i = 0; i < N; i++) begin : g_slot
    logic [2:0] inc, dec;
    logic [4:0] pend_nxt;
    logic       ret_nxt;
    always_comb begin
      inc = 3'd0;
      dec = 3'd0;
      for (int j = 0; j < 2; j++) begin
        if (wq_push[j] && wq_push_slot[j] == slot_t'(i)) inc++;
        if (wq_done[j] && wq_done_slot[j] == slot_t'(i)) dec++;
      end
      pend_nxt = pend[i] + 5'(inc) - 5'(dec);
      ret_nxt  = retired[i] || (retire && retire_slot == slot_t'(i));
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[i]    <= 1'b0;
        retired[i] <= 1'b0;
        idx[i]     <= '0;
        pend[i]    <= '0;
      end else if (alloc && free_slot == slot_t'(i) && any_free) begin
        busy[i]    <= 1'b1;
        retired[i] <= 1'b0;
        idx[i]     <= alloc_idx;
        pend[i]    <= '0;
      end else if (busy[i]) begin
        pend[i]    <= pend_nxt;
        retired[i] <= ret_nxt;
        if (ret_nxt && pend_nxt == 5'd0) begin
          busy[i]    <= 1'b0;
          retired[i] <= 1'b0;
        end
      end
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> any_free)
    else $error("raw_cam: allocation with no free slot");
endmodule
