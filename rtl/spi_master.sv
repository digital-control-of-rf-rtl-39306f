// SPI master writing the six vector modulator control words to the DAC.
//
// The DAC (8-channel, 16-bit, AD5676 type) takes 24-bit frames: a 4-bit
// command (0001, write input register), a 4-bit channel address and 16 data
// bits, MSB first, sampled on the falling edge of SCK. SCK is the system
// clock itself (40 MHz), gated low while the machine is halted.
//
// States: SAMPLE latches the six words, each pair from the LMS taps or, for
// a tap under manual control, from the processor, and pulses LDAC_N low for
// one cycle so that the words written in the previous round reach all
// outputs at once. PREPARE builds the frame of the current channel. SEND
// drives SYNC_N low and shifts one bit per cycle for 24 cycles, then raises
// SYNC_N. SWITCH moves to the next channel; after the sixth channel the
// machine returns to SAMPLE. SYNC_N is high for 3 cycles between frames,
// giving 6 x 27 = 162 cycles (4.05 us at 40 MHz) per update, one LDAC_N
// pulse per update. acc_en pulses once per update, during bit 10 of the
// last channel, after the DAC glitch of the previous update has passed.
// HALT, entered from SAMPLE while halt_en is high, stops SCK and the
// updates. All of this follows the published state machine and timing.
// Own choices: LDAC_N is deasserted during HALT, and SCK is stopped by the
// HALT state rather than directly by halt_en, so that a halt request
// arriving in the middle of a frame cannot cut that frame short. RESET_N is the system
// reset passed on.
module spi_master
  import fdc_pkg::*;
#(
  parameter int unsigned CH      = DAC_CH,   // DAC channels written per update
  parameter int unsigned W_BITS  = DAC_BITS,
  parameter int unsigned EN_BIT  = 10        // bit of the last channel that triggers acc_en
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [CH-1:0][W_BITS-1:0]    control_data,   // offset binary words from the taps
  input  logic [CH-1:0][W_BITS-1:0]    da_value_in,    // manual words from the processor
  output logic [CH-1:0][W_BITS-1:0]    da_value_out,   // words of the current update
  input  logic [CH/2-1:0]              manual_control, // per tap: 1 = manual words
  input  logic                         halt_en,
  output logic                         sck,
  output logic                         sdo,
  output logic                         sync_n,
  output logic                         ldac_n,
  output logic                         reset_n,
  output logic                         acc_en,
  output spi_state_t                   state
);

  localparam int unsigned FRAME = 24;

  logic [FRAME-1:0]          frame;
  logic [4:0]                bit_cnt;
  logic [$clog2(CH)-1:0]     ch_cnt;

  // Gated copy of the system clock, kept low in the HALT state. The enable
  // is re-timed on the falling edge so that it only changes while clk is
  // low and SCK cannot glitch. SCK is an output to the DAC only; no
  // flip-flop in this design is clocked by it.
  logic sck_en;
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) sck_en <= 1'b1;
    else        sck_en <= (state != S_HALT);
  end
  assign sck     = clk & sck_en;
  assign reset_n = rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_SAMPLE;
      da_value_out <= '0;
      frame        <= '0;
      bit_cnt      <= '0;
      ch_cnt       <= '0;
      sdo          <= 1'b0;
      sync_n       <= 1'b1;
      ldac_n       <= 1'b1;
      acc_en       <= 1'b0;
    end else begin
      acc_en <= 1'b0;
      unique case (state)
        S_SAMPLE: begin
          for (int k = 0; k < CH; k++)
            da_value_out[k] <= manual_control[k/2] ? da_value_in[k] : control_data[k];
          ch_cnt  <= '0;
          bit_cnt <= '0;
          ldac_n  <= 1'b0;
          state   <= halt_en ? S_HALT : S_PREPARE;
        end
        S_HALT: begin
          ldac_n <= 1'b1;
          if (!halt_en) state <= S_SAMPLE;
        end
        S_PREPARE: begin
          ldac_n <= 1'b1;
          frame  <= {DAC_CMD_WRITE_INPUT, DAC_ADDR[ch_cnt], da_value_out[ch_cnt]};
          state  <= S_SEND;
        end
        S_SEND: begin
          sync_n <= 1'b0;
          if (32'(bit_cnt) == EN_BIT && 32'(ch_cnt) == CH - 1) acc_en <= 1'b1;
          if (32'(bit_cnt) < FRAME) begin
            sdo     <= frame[FRAME-1 - 32'(bit_cnt)];
            bit_cnt <= bit_cnt + 1'b1;
          end else begin
            sync_n <= 1'b1;
            state  <= (32'(ch_cnt) == CH - 1) ? S_SAMPLE : S_SWITCH;
          end
        end
        S_SWITCH: begin
          ch_cnt  <= ch_cnt + 1'b1;
          bit_cnt <= '0;
          state   <= S_PREPARE;
        end
        default: state <= S_SAMPLE;
      endcase
    end
  end

  // A frame is only ever sent with SYNC_N low.
  a_sync_low_while_sending: assert property (@(posedge clk)
    (state == S_SEND && bit_cnt > 1 && bit_cnt <= 24) |-> !sync_n);

endmodule
