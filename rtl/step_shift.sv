// Step size of the LMS update as an arithmetic right shift.
//
// mu = 2^-shift with shift in 0..MAX_SHIFT (0..16 in the published design).
// The shift is arithmetic, so the sign of the product is kept. The published
// text states that the largest shift makes the step zero and so freezes the
// weights; because an arithmetic shift of a negative 25-bit value never
// reaches zero, a shift of MAX_SHIFT or more is made to give exactly zero
// here (own reading). Combinational.
module step_shift #(
  parameter int unsigned BITS       = 25,
  parameter int unsigned SHIFT_BITS = 5,
  parameter int unsigned MAX_SHIFT  = 16
) (
  input  logic signed [BITS-1:0]  data,
  input  logic [SHIFT_BITS-1:0]   shift,
  output logic signed [BITS-1:0]  result
);

  always_comb begin
    if (32'(shift) >= MAX_SHIFT) result = '0;
    else                         result = data >>> shift;
  end

endmodule
