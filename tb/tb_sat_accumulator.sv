// Self-checking test of sat_accumulator: random 25-bit inputs, random
// enables and clears; a reference sum clipped to the 25-bit range is
// compared with the 16-bit output (its 16 MSBs) after every clock. Large
// inputs drive it into both saturation limits, which are counted.
module tb_sat_accumulator;
  int checks = 0, failures = 0, pos_sat = 0, neg_sat = 0;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, saturated;
  logic signed [24:0] data;
  logic signed [15:0] result;
  longint ref_sum = 0;
  localparam longint MAXV = (1 << 24) - 1, MINV = -(1 << 24);

  sat_accumulator #(.IN_BITS(25), .OUT_BITS(16)) dut (.clk, .rst_n, .clear, .en, .data, .result, .saturated);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      longint v;
      bit sat;
      @(negedge clk);
      if ((n / 500) % 2 == 0) v = longint'($urandom_range(0, (1 << 25) - 1)) - (1 << 24);  // large steps
      else                    v = longint'($urandom_range(0, 8191)) - 4096;                // small steps
      data  = 25'(v);
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 199) == 0);
      sat = 0;
      if (clear) ref_sum = 0;
      else if (en) begin
        ref_sum = ref_sum + v;
        if (ref_sum > MAXV) begin ref_sum = MAXV; pos_sat++; sat = 1; end
        if (ref_sum < MINV) begin ref_sum = MINV; neg_sat++; sat = 1; end
      end
      @(posedge clk); #1;
      checks++;
      if (longint'(result) != (ref_sum >>> 9) || saturated != sat) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d result=%0d exp=%0d sat=%0d/%0d", n, result, ref_sum >>> 9, saturated, sat);
      end
    end
    checks++;
    if (pos_sat == 0 || neg_sat == 0) begin
      failures++;
      $display("FAIL saturation not exercised: pos=%0d neg=%0d", pos_sat, neg_sat);
    end
    $display("saturations: positive %0d negative %0d", pos_sat, neg_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
