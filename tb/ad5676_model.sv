// Behavioural model of an 8-channel 16-bit SPI DAC of the AD5676 kind, for
// testbenches. SDI is sampled on the falling edge of SCLK while SYNC_N is
// low; a frame of 24 bits (command, address, data, MSB first) is acted on
// when SYNC_N rises. Command 0001 writes the input register of the
// addressed channel. A low LDAC_N copies all input registers to the DAC
// registers, whose values are the outputs; RESET_N low sets all registers to
// mid-scale (as at power-up; here only the power-up state is modelled and
// frames are ignored during reset). It counts frames, LDAC pulses and malformed frames.
module ad5676_model (
  input  logic sclk,
  input  logic sdi,
  input  logic sync_n,
  input  logic ldac_n,
  input  logic reset_n,
  output logic [15:0] dac_reg [8],
  output logic [15:0] input_reg [8],
  output int frames,
  output int ldac_pulses,
  output int bad_frames,
  output logic [3:0] last_cmd,
  output logic [3:0] last_addr
);
  logic [23:0] shreg;
  int nbits;

  initial begin
    for (int k = 0; k < 8; k++) begin dac_reg[k] = 16'h8000; input_reg[k] = 16'h8000; end
    frames = 0; ldac_pulses = 0; bad_frames = 0; nbits = 0; shreg = '0;
    last_cmd = '0; last_addr = '0;
  end

  // Bits are taken on SCLK falling edges while SYNC_N is low; the rising
  // edge of SYNC_N ends the frame. One block so that the bit count has a
  // single driver.
  logic in_frame = 1'b0;
  always @(negedge sclk or posedge sync_n) begin
    if (sync_n) begin
      if (in_frame && reset_n) begin
        if (nbits != 24) bad_frames <= bad_frames + 1;
        else begin
          frames    <= frames + 1;
          last_cmd  <= shreg[23:20];
          last_addr <= shreg[19:16];
          if (shreg[23:20] == 4'b0001) input_reg[shreg[18:16]] <= shreg[15:0];
          else bad_frames <= bad_frames + 1;
        end
      end
      in_frame <= 1'b0;
      nbits    <= 0;
    end else if (reset_n) begin
      shreg    <= {shreg[22:0], sdi};
      nbits    <= nbits + 1;
      in_frame <= 1'b1;
    end
  end

  always @(negedge ldac_n) if (reset_n) begin
    ldac_pulses <= ldac_pulses + 1;
    for (int k = 0; k < 8; k++) dac_reg[k] <= input_reg[k];
  end
endmodule
