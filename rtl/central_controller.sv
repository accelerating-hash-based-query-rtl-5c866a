// central_controller: runs the host's commands on the hash engine and shares
// the single external memory port among the engine and the table transfers.
//
// A command names the operation (build, probe or group-by), the aggregation
// function, the first memory word and the row count of the input table and,
// for a probe, the first memory word of the result table. The controller
// pulses `eng_start`, streams the input rows from memory into the engine
// (up to FETCH_MAX reads in flight, buffered in a row queue), writes every
// result row of a probe to consecutive words from `dst_base`, and once all
// rows are in and the engine is idle it returns a status record with the
// result row count, the hash table full flag and the engine statistics.
// Memory port: one request per cycle with valid/ready, read data returned in
// request order with `mem_rsp_valid`. Arbitration: result writes first, then
// engine hash table requests, then row fetches; a small queue remembers
// whose read each response belongs to.
// Memory words: an input row holds key in bits [63:32] and value in [31:0];
// a result row holds (k, v_s, v_t) in bits [95:0]; the hash table starts at
// word HT_BASE and holds one entry per word (ht_pkg::entry_to_word).
// The engine's read data is the memory read data itself (routed by the
// read-ID queue only through its valid), and the top 15 bits of every word
// written are zero, since an entry has 113 bits and a result row 96.
// The role (central control of computation and data movement) is the one the
// design describes; the command set, word layouts and arbitration are this
// design's choices.
module central_controller
  import ht_pkg::*;
#(
  parameter logic [DDR_AW-1:0] HT_BASE = '0,
  parameter int FETCH_MAX = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // commands and status (core clock domain)
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  cmd_t       cmd,
  output logic       sts_valid,
  output status_t    sts,
  // hash engine control
  output op_e        eng_mode,
  output agg_e       eng_agg,
  output logic       eng_onchip,
  output logic       eng_start,
  input  logic       eng_busy,
  input  logic       eng_ht_full,
  input  stats_t     eng_stats,
  output logic       eng_in_valid,
  input  logic       eng_in_ready,
  output key_t       eng_in_key,
  output val_t       eng_in_value,
  input  logic       eng_out_valid,
  output logic       eng_out_ready,
  input  join_row_t  eng_out_row,
  input  logic       eng_req_valid,
  output logic       eng_req_ready,
  input  logic       eng_req_we,
  input  ht_idx_t    eng_req_addr,
  input  entry_t     eng_req_wdata,
  output logic       eng_rsp_valid,
  output entry_t     eng_rsp_data,
  // external memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [DDR_AW-1:0] mem_req_addr,
  output logic [DDR_DW-1:0] mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  logic [DDR_DW-1:0] mem_rsp_data
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_DONE} state_e;
  typedef struct packed { key_t key; val_t value; } row_t;

  localparam int RID_DEPTH = NTOK + FETCH_MAX;

  state_e      state;
  cmd_t        c;
  logic [31:0] fetched;     // row reads issued
  logic [31:0] out_rows;
  logic [$clog2(FETCH_MAX+1)-1:0] fetch_out;  // row reads in flight
  logic [$clog2(FETCH_MAX+1)-1:0] rowq_cnt;
  logic        rowq_empty;
  row_t        rowq_out;

  // ---------------------------------------------------------- arbiter
  logic g_res, g_eng, g_fetch;
  logic want_fetch;

  assign want_fetch = (state == S_RUN) && (fetched != c.n_rows)
                    && (32'(fetch_out) + 32'(rowq_cnt) < 32'(FETCH_MAX));

  assign g_res   = eng_out_valid;
  assign g_eng   = !g_res && eng_req_valid;
  assign g_fetch = !g_res && !g_eng && want_fetch;

  always_comb begin
    mem_req_valid = g_res || g_eng || g_fetch;
    mem_req_we    = 1'b0;
    mem_req_addr  = c.src_base + DDR_AW'(fetched);
    mem_req_wdata = '0;
    if (g_res) begin
      mem_req_we    = 1'b1;
      mem_req_addr  = c.dst_base + DDR_AW'(out_rows);
      mem_req_wdata = DDR_DW'(eng_out_row);
    end else if (g_eng) begin
      mem_req_we    = eng_req_we;
      mem_req_addr  = HT_BASE + DDR_AW'(eng_req_addr);
      mem_req_wdata = entry_to_word(eng_req_wdata);
    end
  end

  assign eng_out_ready = g_res && mem_req_ready;
  assign eng_req_ready = g_eng && mem_req_ready;

  // whose read is answered next (1: row fetch, 0: engine)
  logic rid_out, rid_empty, rd_accept;
  assign rd_accept = mem_req_ready && ((g_eng && !eng_req_we) || g_fetch);

  sync_fifo #(.T(logic), .DEPTH(RID_DEPTH)) u_rid_q (
    .clk, .rst_n, .push(rd_accept), .din(g_fetch), .pop(mem_rsp_valid),
    .dout(rid_out), .full(), .empty(rid_empty), .count()
  );

  assign eng_rsp_valid = mem_rsp_valid && !rid_out;
  assign eng_rsp_data  = word_to_entry(mem_rsp_data);

  // ------------------------------------------------------- row queue
  row_t row_in;
  assign row_in = '{key: mem_rsp_data[63:32], value: mem_rsp_data[31:0]};

  sync_fifo #(.T(row_t), .DEPTH(FETCH_MAX)) u_row_q (
    .clk, .rst_n, .push(mem_rsp_valid && rid_out), .din(row_in),
    .pop(eng_in_valid && eng_in_ready), .dout(rowq_out), .full(), .empty(rowq_empty),
    .count(rowq_cnt)
  );

  assign eng_in_valid = !rowq_empty;
  assign eng_in_key   = rowq_out.key;
  assign eng_in_value = rowq_out.value;

  // ----------------------------------------------------------- control
  assign cmd_ready = (state == S_IDLE);
  assign eng_mode  = c.op;
  assign eng_agg   = c.agg;
  assign eng_onchip = c.onchip;
  assign eng_start = (state == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      c         <= '0;
      fetched   <= '0;
      out_rows  <= '0;
      fetch_out <= '0;
      sts_valid <= 1'b0;
      sts       <= '0;
    end else begin
      sts_valid <= 1'b0;
      fetch_out <= fetch_out + ($bits(fetch_out))'(g_fetch && mem_req_ready)
                             - ($bits(fetch_out))'(mem_rsp_valid && rid_out);
      if (g_fetch && mem_req_ready) fetched <= fetched + 1'b1;
      if (eng_out_ready) out_rows <= out_rows + 1'b1;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          c        <= cmd;
          fetched  <= '0;
          out_rows <= '0;
          state    <= S_START;
        end
        S_START: state <= S_RUN;
        S_RUN: if (fetched == c.n_rows && fetch_out == '0 && rowq_empty && !eng_busy)
          state <= S_DONE;
        S_DONE: begin
          sts_valid <= 1'b1;
          sts       <= '{op: c.op, ht_full: eng_ht_full, out_rows: out_rows, stats: eng_stats};
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> !rid_empty)
    else $error("central_controller: memory response without request");
endmodule
