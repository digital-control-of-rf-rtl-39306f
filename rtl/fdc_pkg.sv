// Shared constants and types of the canceller control system.
//
// The control loop samples four baseband IQ pairs (three canceller taps and
// one feedback chain) with an 8-channel 12-bit ADC, runs one LMS weight update
// per tap and writes six 16-bit control words (I and Q for three vector
// modulators) to an 8-channel SPI DAC. The widths below (12-bit samples,
// 25-bit products and accumulators, 16-bit DAC words, the 24-bit DAC frame
// with its 4-bit command, the DAC channel addresses and the custom
// instruction numbers 40 and 65) follow the published design; the other
// custom instruction numbers and the ADC channel assignment are this
// implementation's own choices. Modules import the whole package, so a
// linter reports the constants a given module does not use; that is expected.
package fdc_pkg;

  localparam int unsigned ADC_BITS  = 12;  // ADC sample width
  localparam int unsigned ADC_CH    = 8;   // ADC channels used
  localparam int unsigned N_TAPS    = 3;   // canceller taps
  localparam int unsigned PROD_BITS = 25;  // complex product / accumulator width
  localparam int unsigned DAC_BITS  = 16;  // DAC word width
  localparam int unsigned DAC_CH    = 2 * N_TAPS;  // DAC channels written (6)
  localparam int unsigned SHIFT_BITS = 5;  // width of a step-size shift count (0..16)

  // ADC channel assignment (own choice): channels 2n/2n+1 carry I/Q of tap n,
  // channels 6/7 carry I/Q of the feedback chain.
  localparam int unsigned FB_I_CH = 6;
  localparam int unsigned FB_Q_CH = 7;

  // AD5676 frame: 4-bit command, 4-bit address, 16-bit data, sent MSB first.
  localparam logic [3:0] DAC_CMD_WRITE_INPUT = 4'b0001;  // write input register

  // DAC output channel of each control word, in the order
  // tap1 I, tap1 Q, tap2 I, tap2 Q, tap3 I, tap3 Q.
  localparam logic [3:0] DAC_ADDR [DAC_CH] = '{4'd6, 4'd7, 4'd5, 4'd4, 4'd3, 4'd2};

  // SPI master states.
  typedef enum logic [2:0] {
    S_SAMPLE,
    S_PREPARE,
    S_SEND,
    S_SWITCH,
    S_HALT
  } spi_state_t;

  // Custom instruction numbers. 40 and 65 are the published ones.
  localparam logic [7:0] CI_ALL_AUTO       = 8'd40;  // manual_control <= 000
  localparam logic [7:0] CI_ALL_MANUAL     = 8'd41;  // manual_control <= 111
  localparam logic [7:0] CI_SET_MANUAL     = 8'd42;  // manual_control <= dataa[2:0]
  localparam logic [7:0] CI_SET_STEP       = 8'd43;  // step shift of tap dataa[9:8] <= dataa[4:0]
  localparam logic [7:0] CI_SET_DA_VALUE   = 8'd44;  // manual word of DAC channel dataa[18:16] <= dataa[15:0]
  localparam logic [7:0] CI_SET_HALT       = 8'd45;  // halt_en <= dataa[0]
  localparam logic [7:0] CI_READ_DA_VALUE  = 8'd46;  // result <= word being sent, channel dataa[2:0]
  localparam logic [7:0] CI_OFFSET_RESTART = 8'd60;  // restart the offset estimation
  localparam logic [7:0] CI_READ_OFFSET    = 8'd61;  // result <= {valid, offset of channel dataa[2:0]}
  localparam logic [7:0] CI_ADC_FIFO_FLUSH = 8'd62;  // empty the ADC capture FIFO
  localparam logic [7:0] CI_ADC_FIFO_READ  = 8'd63;  // result <= channel dataa[2:0] of oldest ADC entry; pop if dataa[31]
  localparam logic [7:0] CI_ADC_FIFO_COUNT = 8'd64;  // result <= ADC FIFO fill level
  localparam logic [7:0] CI_DAC_FIFO_FLUSH = 8'd65;  // empty the DAC capture FIFO
  localparam logic [7:0] CI_DAC_FIFO_READ  = 8'd66;  // result <= channel dataa[2:0] of oldest DAC entry; pop if dataa[31]
  localparam logic [7:0] CI_DAC_FIFO_COUNT = 8'd67;  // result <= DAC FIFO fill level
  localparam logic [7:0] CI_READ_STATUS    = 8'd68;  // result <= status word of the loop (see fdc_top)

endpackage
