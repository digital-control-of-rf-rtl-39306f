// Complex conjugation of a tap sample.
//
// The imaginary part is negated in two's complement. Negating the most
// negative value would overflow back to itself, so in that one case the bits
// are only inverted, which gives the most positive value (an error of one
// LSB), as in the published design. Combinational.
module complex_conj #(
  parameter int unsigned BITS = 12
) (
  input  logic signed [BITS-1:0] in_i,
  input  logic signed [BITS-1:0] in_q,
  output logic signed [BITS-1:0] out_i,
  output logic signed [BITS-1:0] out_q,
  output logic                   clipped   // the negative maximum was met
);

  localparam logic signed [BITS-1:0] NEG_MAX = {1'b1, {(BITS-1){1'b0}}};

  always_comb begin
    out_i   = in_i;
    clipped = (in_q == NEG_MAX);
    out_q   = clipped ? ~in_q : -in_q;
  end

endmodule
