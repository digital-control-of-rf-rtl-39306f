// Self-checking test of complex_conj: every 12-bit imaginary value is
// negated, the most negative one maps to the most positive, the real part
// passes unchanged.
module tb_complex_conj;
  int checks = 0, failures = 0;
  logic signed [11:0] in_i, in_q, out_i, out_q;
  logic clipped;

  complex_conj #(.BITS(12)) dut (.in_i, .in_q, .out_i, .out_q, .clipped);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      int exp_q;
      in_i = 12'($urandom);
      in_q = 12'(v);
      #1;
      exp_q = (v == -2048) ? 2047 : -v;
      checks++;
      if (out_q != 12'(exp_q) || out_i != in_i || clipped != (v == -2048)) begin
        failures++;
        $display("FAIL q=%0d out_q=%0d out_i=%0d in_i=%0d", v, out_q, out_i, in_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
