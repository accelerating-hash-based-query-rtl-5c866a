// sync_fifo_tb: random pushes and pops against a queue model; checks data
// order, full/empty/count, and push-while-full with a simultaneous pop.
module sync_fifo_tb;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0] model[$];
  int checks = 0, failures = 0;

  sync_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // outputs against the model
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || count != model.size()) begin
        failures++;
        $display("flags: empty %0b full %0b count %0d model %0d", empty, full, count, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("dout %h exp %h", dout, model[0]); end
      end
      pop  = (i % 1000 < 500) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      push = full ? pop : ($urandom_range(1) == 1);
      din  = $urandom;
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
