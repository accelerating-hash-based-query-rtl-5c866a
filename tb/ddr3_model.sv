// ddr3_model: behavioural model of the external memory and its controller
// (not synthesizable). One request per cycle with valid/ready; a write is
// stored when accepted; a read samples the memory when accepted and its data
// is returned exactly LATENCY cycles later, in request order, with
// `rsp_valid`. Words never written read as zero. READY_PCT below 100 makes
// the model refuse requests at random. Storage is sparse, so the whole
// address range is available. `peek` and `poke` give testbenches direct
// access to the contents.
module ddr3_model #(
  parameter int AW        = 28,
  parameter int DW        = 128,
  parameter int LATENCY   = 30,
  parameter int READY_PCT = 100
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  logic [DW-1:0] req_wdata,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_data
);
  logic [DW-1:0] mem [logic [AW-1:0]];
  logic [DW-1:0] pipe_d [LATENCY];
  logic          pipe_v [LATENCY];
  int unsigned   reads, writes;

  function automatic logic [DW-1:0] peek(logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(logic [AW-1:0] a, logic [DW-1:0] d);
    mem[a] = d;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) req_ready <= 1'b0;
    else        req_ready <= ($urandom_range(99) < READY_PCT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) pipe_v[i] <= 1'b0;
      reads  <= 0;
      writes <= 0;
    end else begin
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= req_valid && req_ready && !req_we;
      pipe_d[0] <= peek(req_addr);
      if (req_valid && req_ready && req_we) begin
        mem[req_addr] = req_wdata;
        writes <= writes + 1;
      end
      if (req_valid && req_ready && !req_we) reads <= reads + 1;
    end
  end

  assign rsp_valid = pipe_v[LATENCY-1];
  assign rsp_data  = pipe_d[LATENCY-1];
endmodule
