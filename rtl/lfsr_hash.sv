// lfsr_hash: fully pipelined LFSR-based hash function.
//
// The key is shifted bit by bit (MSB first) into a 32-bit Galois LFSR with
// the CRC-32 feedback polynomial 0x04C11DB7, starting from all ones; the low
// HASH_W bits of the final LFSR state are the hash index, which addresses the
// directly indexed lower half of the hash table. The 32 shift steps are
// unrolled and spread over STAGES register stages, so one key is accepted per
// cycle and the index appears STAGES cycles later. A payload travels
// alongside the key. `en` advances the whole pipeline (stall when low).
// That the hash is LFSR based and fully pipelined follows the design
// description; polynomial, seed and pipeline depth are this design's choices.
module lfsr_hash #(
  parameter int KEY_W     = 32,
  parameter int HASH_W    = 23,
  parameter int PAYLOAD_W = 64,
  parameter int STAGES    = 4,
  parameter logic [31:0] POLY = 32'h04C1_1DB7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic [KEY_W-1:0]     in_key,
  input  logic [PAYLOAD_W-1:0] in_payload,
  output logic                 out_valid,
  output logic [HASH_W-1:0]    out_hash,
  output logic [KEY_W-1:0]     out_key,
  output logic [PAYLOAD_W-1:0] out_payload
);
  localparam int BITS_PER_STAGE = (KEY_W + STAGES - 1) / STAGES;

  logic [STAGES:0]              v;
  logic [31:0]                  crc [STAGES+1];
  logic [KEY_W-1:0]             key [STAGES+1];
  logic [PAYLOAD_W-1:0]         pay [STAGES+1];

  assign v[0]   = in_valid;
  assign crc[0] = 32'hFFFF_FFFF;
  assign key[0] = in_key;
  assign pay[0] = in_payload;

  function automatic logic [31:0] step(logic [31:0] c, logic d);
    logic fb;
    fb = c[31] ^ d;
    return {c[30:0], 1'b0} ^ (fb ? POLY : 32'h0);
  endfunction

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [31:0] nxt;
    always_comb begin
      nxt = crc[s];
      for (int b = 0; b < BITS_PER_STAGE; b++) begin
        if (s * BITS_PER_STAGE + b < KEY_W)
          nxt = step(nxt, key[s][KEY_W-1 - (s * BITS_PER_STAGE + b)]);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[s+1]   <= 1'b0;
        crc[s+1] <= '0;
        key[s+1] <= '0;
        pay[s+1] <= '0;
      end else if (en) begin
        v[s+1]   <= v[s];
        crc[s+1] <= nxt;
        key[s+1] <= key[s];
        pay[s+1] <= pay[s];
      end
    end
  end

  assign out_valid   = v[STAGES];
  assign out_hash    = crc[STAGES][HASH_W-1:0];
  assign out_key     = key[STAGES];
  assign out_payload = pay[STAGES];
endmodule
