// Self-checking test of lms_tap against an independent model of
//   w_I += mu (x_I e_I + x_Q e_Q),  w_Q += mu (x_I e_Q - x_Q e_I)
// with mu = 2^-shift, 25-bit saturating sums and 16-bit outputs (the sums'
// MSBs). Random samples, shifts, enables and clears are applied every
// cycle; the product takes one cycle, so an enable adds the product of the
// samples presented one cycle earlier. The test also checks that a shift of
// 16 freezes the weights and that both saturation and the conjugation of the
// most negative Q sample occur.
module tb_lms_tap;
  int checks = 0, failures = 0, sats = 0, clips = 0, frozen = 0;
  logic clk = 0, rst_n = 0, acc_en = 0, clear = 0;
  logic signed [11:0] x_i, x_q, e_i, e_q;
  logic [4:0] shift;
  logic signed [15:0] w_i, w_q;
  logic conj_clipped, saturated;
  longint acc_i = 0, acc_q = 0, pp_i = 0, pp_q = 0;
  localparam longint MAXV = (1 << 24) - 1, MINV = -(1 << 24);

  lms_tap dut (.clk, .rst_n, .x_i, .x_q, .e_i, .e_q, .shift, .acc_en, .clear,
               .w_i, .w_q, .conj_clipped, .saturated);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint mu(longint p, int s);
    if (s >= 16) return 0;
    return p >>> s;
  endfunction

  function automatic longint sat(longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  initial begin
    x_i = 0; x_q = 0; e_i = 0; e_q = 0; shift = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      longint np_i, np_q, xcq, old_i, old_q;
      x_i = 12'($urandom); x_q = 12'($urandom);
      e_i = 12'($urandom); e_q = 12'($urandom);
      if (n % 97 == 0) x_q = -12'sd2048;
      shift  = 5'((n / 1000) % 2 == 0 ? $urandom_range(0, 3) : $urandom_range(4, 17));
      acc_en = ($urandom_range(0, 2) == 0);
      clear  = ($urandom_range(0, 499) == 0);
      // model: product of this cycle's samples, used at the next enable
      xcq  = (x_q == -12'sd2048) ? 2047 : -longint'(x_q);
      np_i = longint'(x_i) * e_i - xcq * e_q;
      np_q = longint'(x_i) * e_q + xcq * e_i;
      old_i = acc_i; old_q = acc_q;
      if (clear) begin acc_i = 0; acc_q = 0; end
      else if (acc_en) begin
        longint ri, rq;
        ri = acc_i + mu(pp_i, shift);
        rq = acc_q + mu(pp_q, shift);
        acc_i = sat(ri); acc_q = sat(rq);
        if (acc_i != ri || acc_q != rq) sats++;
        if (shift >= 16) frozen++;
      end
      checks++;
      if (conj_clipped != (x_q == -12'sd2048)) failures++;
      if (conj_clipped) clips++;
      @(posedge clk); #1;
      pp_i = np_i; pp_q = np_q;
      checks++;
      if (longint'(w_i) != (acc_i >>> 9) || longint'(w_q) != (acc_q >>> 9)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d w=%0d,%0d exp %0d,%0d", n, w_i, w_q, acc_i >>> 9, acc_q >>> 9);
      end
      if (shift >= 16 && acc_en && !clear) begin
        checks++;
        if (acc_i != old_i || acc_q != old_q) begin failures++; $display("FAIL frozen model"); end
      end
      @(negedge clk);
    end
    checks++;
    if (sats == 0 || clips == 0 || frozen == 0) begin
      failures++;
      $display("FAIL not exercised: saturations %0d conj clips %0d frozen updates %0d", sats, clips, frozen);
    end
    $display("saturations %0d conj clips %0d frozen updates %0d", sats, clips, frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
