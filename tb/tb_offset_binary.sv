// Self-checking test of offset_binary: every 16-bit two's complement value
// v must become v + 2^15, and the 3-bit table of the two representations
// (011->111 ... 100->000) must hold.
module tb_offset_binary;
  int checks = 0, failures = 0;
  logic signed [15:0] d16;
  logic [15:0] r16;
  logic signed [2:0] d3;
  logic [2:0] r3;

  offset_binary #(.WIDTH(16)) dut (.data(d16), .result(r16));
  offset_binary #(.WIDTH(3))  dut3 (.data(d3), .result(r3));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      d16 = 16'(v);
      #1;
      checks++;
      if (int'(r16) != v + 32768) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d r=%0d", v, r16);
      end
    end
    for (int v = -4; v < 4; v++) begin
      d3 = 3'(v);
      #1;
      checks++;
      if (int'(r3) != v + 4) begin
        failures++;
        $display("FAIL 3-bit v=%0d r=%b", v, r3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
