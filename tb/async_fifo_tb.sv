// async_fifo_tb: writer at 150 MHz and reader at 200 MHz with random
// enables; checks order and completeness of the data, that `full` stops
// the writer and that nothing is read while `empty`.
module async_fifo_tb;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wdata, rdata;
  logic [15:0] model[$];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, n_full = 0;

  async_fifo #(.T(logic [15:0]), .DEPTH(4)) dut (.*);

  always #3.333 wclk = ~wclk;
  always #2.5   rclk = ~rclk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    #20 wrst_n = 1; rrst_n = 1;
    while (n_wr < 3000) begin
      @(negedge wclk);
      wr_en = (n_wr < 1500) ? 1'b1 : ($urandom_range(3) == 0);
      wdata = $urandom;
      @(posedge wclk);
      if (full) n_full++;
      if (wr_en && !full) begin model.push_back(wdata); n_wr++; end
    end
    @(negedge wclk) wr_en = 0;
  end

  // reader
  initial begin
    #20;
    while (n_rd < 3000) begin
      @(negedge rclk);
      rd_en = ($urandom_range(2) != 0);
      @(posedge rclk);
      if (rd_en && !empty) begin
        checks++;
        if (model.size() == 0 || rdata !== model[0]) begin
          failures++;
          $display("read %h expected %h", rdata, model.size() ? model[0] : 16'hx);
        end
        if (model.size() != 0) void'(model.pop_front());
        n_rd++;
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
