// Self-checking test of step_shift: random signed 25-bit values against
// floor(value / 2^shift) for shifts 0..15 and zero for 16 and above.
module tb_step_shift;
  int checks = 0, failures = 0;
  logic signed [24:0] data, result;
  logic [4:0] shift;

  step_shift #(.BITS(25), .SHIFT_BITS(5), .MAX_SHIFT(16)) dut (.data, .shift, .result);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint v, e;
      v = longint'($urandom_range(0, (1 << 25) - 1)) - (1 << 24);
      if (n < 32) v = (n % 2) ? -(1 << 24) : (1 << 24) - 1;
      data  = 25'(v);
      shift = 5'(n % 32);
      #1;
      if (shift >= 16) e = 0;
      else begin
        // floor division by 2^shift
        e = v / (longint'(1) << shift);
        if (v < 0 && (v % (longint'(1) << shift)) != 0) e = e - 1;
      end
      checks++;
      if (longint'(result) != e) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d s=%0d got %0d exp %0d", v, shift, result, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
