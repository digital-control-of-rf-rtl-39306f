// LMS weight calculation of one canceller tap.
//
// Implements w(k+1) = w(k) + mu x*(k) e(k) for one tap, split into I and Q:
//   w_I += mu (x_I e_I + x_Q e_Q)
//   w_Q += mu (x_I e_Q - x_Q e_I)
// The tap sample x is conjugated, multiplied with the feedback (error)
// sample e in a 12x12 complex multiplier with 25-bit results, scaled by
// mu = 2^-shift and added into two 25-bit saturating accumulators whose
// 16 MSBs are the I and Q control words. This is the published structure.
// Timing: the product is registered (1 cycle); the accumulators add on the
// cycles where acc_en is high, so a weight changes one cycle after acc_en
// and reflects the samples presented two cycles before. clear (manual
// control of the tap) empties both accumulators.
module lms_tap
  import fdc_pkg::*;
#(
  parameter int unsigned IN_BITS  = ADC_BITS,
  parameter int unsigned ACC_BITS = PROD_BITS,
  parameter int unsigned W_BITS   = DAC_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [IN_BITS-1:0] x_i,     // tap baseband sample
  input  logic signed [IN_BITS-1:0] x_q,
  input  logic signed [IN_BITS-1:0] e_i,     // feedback (error) baseband sample
  input  logic signed [IN_BITS-1:0] e_q,
  input  logic [SHIFT_BITS-1:0]     shift,   // step size mu = 2^-shift
  input  logic                      acc_en,  // accumulate once per DAC update
  input  logic                      clear,   // tap under manual control
  output logic signed [W_BITS-1:0]  w_i,     // weight, two's complement
  output logic signed [W_BITS-1:0]  w_q,
  output logic                      conj_clipped,
  output logic                      saturated
);

  logic signed [IN_BITS-1:0]  xc_i, xc_q;
  logic signed [ACC_BITS-1:0] p_i, p_q, s_i, s_q;
  logic                       sat_i, sat_q;

  complex_conj #(.BITS(IN_BITS)) u_conj (
    .in_i(x_i), .in_q(x_q), .out_i(xc_i), .out_q(xc_q), .clipped(conj_clipped)
  );

  complex_mult #(.IN_BITS(IN_BITS), .OUT_BITS(ACC_BITS)) u_mult (
    .clk, .rst_n, .a_i(xc_i), .a_q(xc_q), .b_i(e_i), .b_q(e_q), .p_i, .p_q
  );

  step_shift #(.BITS(ACC_BITS), .SHIFT_BITS(SHIFT_BITS)) u_mu_i (
    .data(p_i), .shift, .result(s_i)
  );
  step_shift #(.BITS(ACC_BITS), .SHIFT_BITS(SHIFT_BITS)) u_mu_q (
    .data(p_q), .shift, .result(s_q)
  );

  sat_accumulator #(.IN_BITS(ACC_BITS), .OUT_BITS(W_BITS)) u_acc_i (
    .clk, .rst_n, .clear, .en(acc_en), .data(s_i), .result(w_i), .saturated(sat_i)
  );
  sat_accumulator #(.IN_BITS(ACC_BITS), .OUT_BITS(W_BITS)) u_acc_q (
    .clk, .rst_n, .clear, .en(acc_en), .data(s_q), .result(w_q), .saturated(sat_q)
  );

  assign saturated = sat_i | sat_q;

endmodule
