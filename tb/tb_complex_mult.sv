// Self-checking test of complex_mult: random and extreme 12-bit operands,
// the 25-bit real and imaginary results must equal the exact complex
// product exactly one clock after the operands are applied.
module tb_complex_mult;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] a_i, a_q, b_i, b_q;
  logic signed [24:0] p_i, p_q;
  longint exp_i, exp_q;

  complex_mult #(.IN_BITS(12), .OUT_BITS(25)) dut (.clk, .rst_n, .a_i, .a_q, .b_i, .b_q, .p_i, .p_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick(int n);
    case (n % 8)
      0: return -2048;
      1: return 2047;
      default: return int'($urandom_range(0, 4095)) - 2048;
    endcase
  endfunction

  initial begin
    a_i = 0; a_q = 0; b_i = 0; b_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      a_i = 12'(pick(n)); a_q = 12'(pick(n + 3)); b_i = 12'(pick(n + 5)); b_q = 12'(pick(n / 8));
      exp_i = longint'(a_i) * b_i - longint'(a_q) * b_q;
      exp_q = longint'(a_i) * b_q + longint'(a_q) * b_i;
      @(posedge clk); #1;   // one clock of latency
      checks++;
      if (longint'(p_i) != exp_i || longint'(p_q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL %0d %0d %0d %0d -> %0d %0d exp %0d %0d", a_i, a_q, b_i, b_q, p_i, p_q, exp_i, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
