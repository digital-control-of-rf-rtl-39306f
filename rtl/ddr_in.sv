// DDR receiver for the serial ADC data lines.
//
// Each LVDS data line carries two bits per bit-clock period. A flip-flop on
// the falling edge of the bit clock catches the first bit of each pair and a
// second flip-flop re-times it to the rising edge, so that it appears as
// ddr_low together with the second bit, which is caught directly on the
// rising edge as ddr_high. Both outputs change only on the rising edge of
// sclk. This is the structure of the published DDR input block; one block
// serves CH lines in parallel. Reset (the PLL lock in the system) is
// asynchronous and active low, an own choice.
module ddr_in #(
  parameter int unsigned CH = 8  // number of data lines
) (
  input  logic          sclk,      // bit clock (240 MHz for 12-bit, 40 MSPS)
  input  logic          rst_n,
  input  logic [CH-1:0] data_in,   // serial data, one bit per line
  output logic [CH-1:0] ddr_low,   // bit sampled on the falling edge (first of a pair)
  output logic [CH-1:0] ddr_high   // bit sampled on the rising edge (second of a pair)
);

  logic [CH-1:0] fall_q;

  always_ff @(negedge sclk or negedge rst_n) begin
    if (!rst_n) fall_q <= '0;
    else        fall_q <= data_in;
  end

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) begin
      ddr_low  <= '0;
      ddr_high <= '0;
    end else begin
      ddr_low  <= fall_q;
      ddr_high <= data_in;
    end
  end

endmodule
