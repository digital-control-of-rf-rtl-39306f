// FPGA control system of a three-tap analog RF self-interference canceller.
//
// The canceller builds a cancellation signal from three delayed copies of the
// transmit signal, each scaled and phase-shifted by a vector modulator driven
// by two control voltages (I and Q). This block closes the loop: it receives
// the baseband IQ of the three taps and of the canceller output (the error)
// from an 8-channel 12-bit ADC over 8 serial LVDS lines, removes each
// channel's DC offset, runs an LMS update per tap, w += mu x* e, and writes
// the six resulting control words to an 8-channel 16-bit DAC over SPI.
//
// Data path (published structure): ddr_in -> deserializer (bit clock sclk,
// 6 x pclk) -> offset_remove -> three lms_tap -> offset_binary ->
// spi_master. One DAC update takes 162 cycles (4.05 us at 40 MHz); the
// spi_master pulses the accumulators once per update so the weights change
// at the rate the DAC can follow. A soft processor (not part of this RTL)
// controls the loop through the custom instruction port decoded in ci_regs:
// manual or automatic control per tap, manual DAC words, step sizes, halt,
// offset re-estimation and two capture FIFOs (ADC samples, DAC words) for
// debugging.
//
// Clocks: sclk is the bit clock, pclk the system clock at the frame rate; a
// PLL outside this block derives both from the ADC frame clock and places
// each pclk rising edge on the first sclk rising edge after a frame has been
// completed in the shift registers. rst_n is the PLL lock, asynchronous and
// active low. ADC channel assignment (own choice): 2n, 2n+1 = I, Q of tap
// n; 6, 7 = I, Q of the feedback. The DAC's SCLK is the gated system clock
// and its RESET_N is the system reset, passed straight through.
// Also own choices: the offset estimator skips the first 7 samples after
// reset (still the receiver's reset values), and the status word read by
// the processor carries sticky per-tap flags for the one-cycle events
// (accumulator saturation, protected conjugation). The custom instruction
// port takes an instruction in one cycle and answers on the next.
module fdc_top
  import fdc_pkg::*;
#(
  parameter int unsigned OFFSET_LOG2_N  = 16,     // offset = mean of 2^16 samples
  parameter int unsigned ADC_FIFO_DEPTH = 128,    // ADC capture, samples
  parameter int unsigned DAC_FIFO_DEPTH = 65536   // DAC capture, updates
) (
  input  logic              sclk,        // bit clock from the PLL (240 MHz)
  input  logic              pclk,        // system clock from the PLL (40 MHz)
  input  logic              rst_n,       // PLL locked
  input  logic [ADC_CH-1:0] lvds_data,   // ADC serial data lines
  // custom instruction port of the soft processor
  input  logic              ci_clk_en,
  input  logic              ci_start,
  input  logic [7:0]        ci_n,
  input  logic [31:0]       ci_dataa,
  output logic [31:0]       ci_result,
  output logic              ci_done,
  // DAC serial interface
  output logic              dac_sclk,
  output logic              dac_sdi,
  output logic              dac_sync_n,
  output logic              dac_ldac_n,
  output logic              dac_reset_n
);

  // ---------------------------------------------------------------- capture
  logic [ADC_CH-1:0]                ddr_low, ddr_high;
  logic [ADC_CH-1:0][ADC_BITS-1:0]  raw, clean, offset;
  logic                             offset_valid, offset_restart;

  ddr_in #(.CH(ADC_CH)) u_ddr (
    .sclk, .rst_n, .data_in(lvds_data), .ddr_low, .ddr_high
  );

  deserializer #(.CH(ADC_CH), .BITS(ADC_BITS)) u_deser (
    .sclk, .pclk, .rst_n, .ddr_low, .ddr_high, .data_out(raw)
  );

  // The first samples after reset are the receiver registers' reset values,
  // not ADC data; the first offset estimate starts after them (own choice).
  logic [2:0] warmup;
  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n)          warmup <= '1;
    else if (warmup != 0) warmup <= warmup - 1'b1;
  end

  offset_remove #(.CH(ADC_CH), .BITS(ADC_BITS), .LOG2_N(OFFSET_LOG2_N)) u_offset (
    .clk(pclk), .rst_n, .restart(offset_restart || warmup != 0), .data_in(raw),
    .data_out(clean), .offset, .offset_valid
  );

  // -------------------------------------------------------------- algorithm
  logic [N_TAPS-1:0]                 manual_control;
  logic [N_TAPS-1:0][SHIFT_BITS-1:0] step;
  logic [DAC_CH-1:0][DAC_BITS-1:0]   control_data, da_value_in, da_value_out;
  logic                              acc_en, halt_en;
  logic [N_TAPS-1:0]                 conj_clipped, acc_saturated;
  spi_state_t                        spi_state;

  for (genvar t = 0; t < N_TAPS; t++) begin : g_tap
    logic signed [DAC_BITS-1:0] w_i, w_q;

    lms_tap u_tap (
      .clk(pclk), .rst_n,
      .x_i(clean[2*t]), .x_q(clean[2*t+1]),
      .e_i(clean[FB_I_CH]), .e_q(clean[FB_Q_CH]),
      .shift(step[t]), .acc_en, .clear(manual_control[t]),
      .w_i, .w_q, .conj_clipped(conj_clipped[t]), .saturated(acc_saturated[t])
    );

    offset_binary #(.WIDTH(DAC_BITS)) u_ob_i (.data(w_i), .result(control_data[2*t]));
    offset_binary #(.WIDTH(DAC_BITS)) u_ob_q (.data(w_q), .result(control_data[2*t+1]));
  end

  // -------------------------------------------------------------------- DAC
  spi_master u_spi (
    .clk(pclk), .rst_n, .control_data, .da_value_in, .da_value_out,
    .manual_control, .halt_en,
    .sck(dac_sclk), .sdo(dac_sdi), .sync_n(dac_sync_n), .ldac_n(dac_ldac_n),
    .reset_n(dac_reset_n), .acc_en, .state(spi_state)
  );

  // ---------------------------------------------------- processor interface
  logic                               adc_fifo_flush, adc_fifo_pop;
  logic                               dac_fifo_flush, dac_fifo_pop;
  logic [ADC_CH*ADC_BITS-1:0]         adc_fifo_data;
  logic [DAC_CH*DAC_BITS-1:0]         dac_fifo_data;
  logic [$clog2(ADC_FIFO_DEPTH):0]    adc_fifo_count;
  logic [$clog2(DAC_FIFO_DEPTH):0]    dac_fifo_count;
  logic                               adc_fifo_full, adc_fifo_empty, adc_fifo_capturing;
  logic                               dac_fifo_full, dac_fifo_empty, dac_fifo_capturing;

  // Status word: [2:0] SPI state, [5:3] conjugation clipped per tap,
  // [8:6] accumulator saturated per tap (both live, one cycle), [9] offset
  // estimate valid, [15:10] full/empty/capturing of the ADC and DAC FIFOs,
  // [18:16] / [21:19] conjugation clipped / accumulator saturated per tap
  // since the previous status read (sticky, own addition so that the
  // processor sees one-cycle events).
  logic [31:0]       status;
  logic              status_read;
  logic [N_TAPS-1:0] clip_seen, sat_seen;

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      clip_seen <= '0;
      sat_seen  <= '0;
    end else begin
      clip_seen <= (status_read ? '0 : clip_seen) | conj_clipped;
      sat_seen  <= (status_read ? '0 : sat_seen)  | acc_saturated;
    end
  end

  assign status = {10'(0), sat_seen, clip_seen,
                   dac_fifo_capturing, dac_fifo_empty, dac_fifo_full,
                   adc_fifo_capturing, adc_fifo_empty, adc_fifo_full,
                   offset_valid, acc_saturated, conj_clipped, spi_state};

  ci_regs #(.ADC_FIFO_DEPTH(ADC_FIFO_DEPTH), .DAC_FIFO_DEPTH(DAC_FIFO_DEPTH)) u_ci (
    .clk(pclk), .rst_n,
    .clk_en(ci_clk_en), .start(ci_start), .n(ci_n), .dataa(ci_dataa),
    .result(ci_result), .done(ci_done),
    .manual_control, .step_shift(step), .da_value_in, .halt_en,
    .offset_restart, .offset, .offset_valid,
    .da_value_out,
    .adc_fifo_flush, .adc_fifo_pop, .adc_fifo_data(adc_fifo_data), .adc_fifo_count,
    .dac_fifo_flush, .dac_fifo_pop, .dac_fifo_data(dac_fifo_data), .dac_fifo_count,
    .status, .status_read
  );

  // Raw deserialized frames, one per cycle.
  capture_fifo #(.WIDTH(ADC_CH*ADC_BITS), .DEPTH(ADC_FIFO_DEPTH)) u_adc_fifo (
    .clk(pclk), .rst_n, .flush(adc_fifo_flush), .wr_en(1'b1), .wr_data(raw),
    .rd_pop(adc_fifo_pop), .rd_data(adc_fifo_data), .count(adc_fifo_count),
    .full(adc_fifo_full), .empty(adc_fifo_empty), .capturing(adc_fifo_capturing)
  );

  // DAC words, one set per update (while LDAC_N is pulsed low).
  capture_fifo #(.WIDTH(DAC_CH*DAC_BITS), .DEPTH(DAC_FIFO_DEPTH)) u_dac_fifo (
    .clk(pclk), .rst_n, .flush(dac_fifo_flush), .wr_en(!dac_ldac_n), .wr_data(da_value_out),
    .rd_pop(dac_fifo_pop), .rd_data(dac_fifo_data), .count(dac_fifo_count),
    .full(dac_fifo_full), .empty(dac_fifo_empty), .capturing(dac_fifo_capturing)
  );

endmodule
