// Complex multiplier of the LMS weight update.
//
// Computes (a_i + j a_q)(b_i + j b_q) with four multipliers and two adders:
// p_i = a_i b_i - a_q b_q and p_q = a_i b_q + a_q b_i. Two 12-bit operands
// give 24-bit products and their sum or difference needs 25 bits, so the
// output is exact. The result is registered once (latency 1 clock), the
// settings of the vendor multiplier used in the published design.
module complex_mult #(
  parameter int unsigned IN_BITS  = 12,
  parameter int unsigned OUT_BITS = 2 * IN_BITS + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [IN_BITS-1:0]  a_i,
  input  logic signed [IN_BITS-1:0]  a_q,
  input  logic signed [IN_BITS-1:0]  b_i,
  input  logic signed [IN_BITS-1:0]  b_q,
  output logic signed [OUT_BITS-1:0] p_i,
  output logic signed [OUT_BITS-1:0] p_q
);

  logic signed [OUT_BITS-1:0] ii, qq, iq, qi;

  always_comb begin
    ii = OUT_BITS'(a_i * b_i);
    qq = OUT_BITS'(a_q * b_q);
    iq = OUT_BITS'(a_i * b_q);
    qi = OUT_BITS'(a_q * b_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_i <= '0;
      p_q <= '0;
    end else begin
      p_i <= ii - qq;
      p_q <= iq + qi;
    end
  end

endmodule
