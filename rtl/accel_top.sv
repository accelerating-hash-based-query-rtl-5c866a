// accel_top: FPGA part of the hash join / group-by accelerator.
//
// The host link side (command in, status out) runs on `hclk`; everything
// else runs on `clk`. Two asynchronous FIFOs carry command records into the
// core clock domain and completion records back. In the core domain the
// central controller executes each command on the hash engine (hash
// function, request queues, direct-mapped hash table cache, CAM and the
// build / probe / group-by logic) and shares the one external memory port
// between the engine's hash table traffic and the transfer of input and
// result tables. The memory port is the interface of an external memory
// controller (read data returned in request order); the host link controller
// and the memory controller themselves are outside this module.
// Commands: see ht_pkg::cmd_t; a build must precede the probes that use its
// hash table, and the hash table area of memory (HT_BASE, 2^24 words) must
// hold zeros before a build or group-by.
module accel_top
  import ht_pkg::*;
#(
  parameter int CACHE_IDX_W = 18,
  parameter logic [DDR_AW-1:0] HT_BASE = '0
) (
  // host link clock domain
  input  logic              hclk,
  input  logic              hrst_n,
  input  logic              host_cmd_valid,
  output logic              host_cmd_ready,
  input  cmd_t              host_cmd,
  output logic              host_sts_valid,
  input  logic              host_sts_ready,
  output status_t           host_sts,
  // core clock domain
  input  logic              clk,
  input  logic              rst_n,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [DDR_AW-1:0] mem_req_addr,
  output logic [DDR_DW-1:0] mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  logic [DDR_DW-1:0] mem_rsp_data
);
  // ------------------------------------------------ clock domain crossing
  logic    cmdq_full, cmdq_empty, cmd_ready;
  cmd_t    cmd;
  logic    stsq_full, stsq_empty;
  logic    sts_valid;
  status_t sts;

  async_fifo #(.T(cmd_t), .DEPTH(4)) u_cmd_fifo (
    .wclk(hclk), .wrst_n(hrst_n), .wr_en(host_cmd_valid), .wdata(host_cmd), .full(cmdq_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(cmd_ready), .rdata(cmd), .empty(cmdq_empty)
  );
  assign host_cmd_ready = !cmdq_full;

  async_fifo #(.T(status_t), .DEPTH(4)) u_sts_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(sts_valid), .wdata(sts), .full(stsq_full),
    .rclk(hclk), .rrst_n(hrst_n), .rd_en(host_sts_ready), .rdata(host_sts), .empty(stsq_empty)
  );
  assign host_sts_valid = !stsq_empty;

  // ------------------------------------------------------ controller
  op_e       eng_mode;
  agg_e      eng_agg;
  logic      eng_onchip;
  logic      eng_start, eng_busy, eng_ht_full;
  stats_t    eng_stats;
  logic      eng_in_valid, eng_in_ready;
  key_t      eng_in_key;
  val_t      eng_in_value;
  logic      eng_out_valid, eng_out_ready;
  join_row_t eng_out_row;
  logic      eng_req_valid, eng_req_ready, eng_req_we;
  ht_idx_t   eng_req_addr;
  entry_t    eng_req_wdata;
  logic      eng_rsp_valid;
  entry_t    eng_rsp_data;
  logic      cmd_valid;

  // the controller takes a command only while idle
  logic ctrl_ready;
  assign cmd_valid = !cmdq_empty;
  assign cmd_ready = cmd_valid && ctrl_ready;

  central_controller #(.HT_BASE(HT_BASE)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid(cmd_valid), .cmd_ready(ctrl_ready), .cmd(cmd),
    .sts_valid(sts_valid), .sts(sts),
    .eng_mode, .eng_agg, .eng_onchip, .eng_start, .eng_busy, .eng_ht_full, .eng_stats,
    .eng_in_valid, .eng_in_ready, .eng_in_key, .eng_in_value,
    .eng_out_valid, .eng_out_ready, .eng_out_row,
    .eng_req_valid, .eng_req_ready, .eng_req_we, .eng_req_addr, .eng_req_wdata,
    .eng_rsp_valid, .eng_rsp_data,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_data
  );

  // ---------------------------------------------------------- engine
  hash_engine #(.CACHE_IDX_W(CACHE_IDX_W)) u_engine (
    .clk, .rst_n,
    .mode(eng_mode), .agg(eng_agg), .onchip(eng_onchip), .start(eng_start),
    .busy(eng_busy), .ht_full(eng_ht_full), .stats(eng_stats),
    .in_valid(eng_in_valid), .in_ready(eng_in_ready), .in_key(eng_in_key), .in_value(eng_in_value),
    .out_valid(eng_out_valid), .out_ready(eng_out_ready), .out_row(eng_out_row),
    .ht_req_valid(eng_req_valid), .ht_req_ready(eng_req_ready), .ht_req_we(eng_req_we),
    .ht_req_addr(eng_req_addr), .ht_req_wdata(eng_req_wdata),
    .ht_rsp_valid(eng_rsp_valid), .ht_rsp_data(eng_rsp_data)
  );

  a_sts_room: assert property (@(posedge clk) disable iff (!rst_n) sts_valid |-> !stsq_full)
    else $error("accel_top: status FIFO full, completion record lost");
endmodule
