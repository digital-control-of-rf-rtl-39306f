// Two's complement to offset binary conversion for the DAC.
//
// Adding 2^(WIDTH-1) maps -2^(WIDTH-1)..2^(WIDTH-1)-1 onto 0..2^WIDTH-1, so a
// zero weight becomes mid-scale, the 1.5 V null point of the vector
// modulator. Modulo 2^WIDTH the addition only flips the MSB, which is how it
// is done here, as in the published design. Combinational.
module offset_binary #(
  parameter int unsigned WIDTH = 16
) (
  input  logic signed [WIDTH-1:0] data,
  output logic        [WIDTH-1:0] result
);

  assign result = {~data[WIDTH-1], data[WIDTH-2:0]};

endmodule
