// Deserializer: DDR bit pairs to parallel 12-bit ADC frames.
//
// For every channel two 6-deep shift registers, one fed by the falling-edge
// bits (ddr_low) and one by the rising-edge bits (ddr_high), shift on each
// rising edge of the bit clock. Viewed as one 12-bit word per channel, the
// word shifts left by two and takes {ddr_low, ddr_high} in its two LSBs, so
// after six bit-clock edges the first bit received (the ADC's MSB) sits in
// bit 11. On the rising edge of the system clock, which the PLL places on the
// first bit-clock edge after a complete frame, all words are copied into the
// output register. The alignment of the two clocks is the clock generator's
// job, as in the published design. Frames are 12 bits wide as published;
// reset is asynchronous and active low.
module deserializer #(
  parameter int unsigned CH   = 8,   // channels
  parameter int unsigned BITS = 12   // bits per frame (even)
) (
  input  logic                          sclk,      // bit clock
  input  logic                          pclk,      // system clock, frame rate
  input  logic                          rst_n,
  input  logic [CH-1:0]                 ddr_low,
  input  logic [CH-1:0]                 ddr_high,
  output logic [CH-1:0][BITS-1:0]       data_out   // frame of each channel, MSB = first bit
);

  logic [CH-1:0][BITS-1:0] shreg;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) shreg <= '0;
    else begin
      for (int c = 0; c < CH; c++)
        shreg[c] <= {shreg[c][BITS-3:0], ddr_low[c], ddr_high[c]};
    end
  end

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else        data_out <= shreg;
  end

endmodule
