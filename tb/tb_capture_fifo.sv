// Self-checking test of capture_fifo (depth 16): a counter is written on
// random cycles; the buffer must record 16 consecutive written values after
// a flush and then stop (values written while full are lost), must not
// restart until drained, and must return the recorded values in order.
module tb_capture_fifo;
  localparam int D = 16;
  int checks = 0, failures = 0, stops = 0;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0, rd_pop = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0] count;
  logic full, empty, capturing;

  capture_fifo #(.WIDTH(32), .DEPTH(D)) dut (.clk, .rst_n, .flush, .wr_en, .wr_data, .rd_pop,
                                             .rd_data, .count, .full, .empty, .capturing);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer: a new counter value on random cycles.
  task automatic write_for(int cycles);
    repeat (cycles) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 1) == 1);
      if (wr_en) wr_data = wr_data + 1;
      @(posedge clk);
    end
    @(negedge clk) wr_en = 0;
  endtask

  initial begin
    logic [31:0] first;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // flush, then the next D written values are captured
      @(negedge clk) flush = 1;
      @(negedge clk) flush = 0;
      first = wr_data + 1;
      write_for(4 * D + $urandom_range(0, 20));
      checks++;
      if (!full || capturing) begin failures++; $display("FAIL round %0d not full/stopped", round); end
      else stops++;
      // drain half, write more: nothing may be captured while not empty
      for (int k = 0; k < D; k++) begin
        if (k == D / 2) write_for(10);
        checks++;
        if (rd_data != first + 32'(k)) begin
          failures++;
          $display("FAIL round %0d entry %0d got %0d exp %0d", round, k, rd_data, first + 32'(k));
        end
        @(negedge clk) rd_pop = 1;
        @(negedge clk) rd_pop = 0;
      end
      checks++;
      if (!empty || count != 0) begin failures++; $display("FAIL not empty after drain"); end
      // once empty it captures again from the next write
      @(negedge clk);
      first = wr_data + 1;
      write_for(3);
      checks++;
      if (count != 0 && rd_data != first) begin failures++; $display("FAIL re-arm got %0d exp %0d", rd_data, first); end
    end
    checks++;
    if (stops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
