// Custom instruction interface between the soft processor and the fabric.
//
// The user interface runs on a soft processor that reaches the control
// loop only through custom instructions carrying an 8-bit instruction number
// n and a 32-bit operand. This block decodes them into the loop's settings
// (manual/automatic control per tap, step sizes, manual DAC words, halt) and
// into strobes and read-backs for the offset estimator and the two capture
// FIFOs. Instruction 40 (all taps automatic) and 65 (flush the DAC capture
// FIFO) are the published numbers; the other numbers, listed in fdc_pkg,
// are this implementation's own. The handshake is that of a multi-cycle
// custom instruction: an instruction is taken on a cycle with clk_en and
// start high, its result is registered and done pulses on the next cycle.
// Reset state (own choice): all taps manual with mid-scale words (the
// vector modulators' null point, as the DAC's own reset state), step shift 0
// (mu = 1), not halted.
// Operand bits that no instruction uses (dataa[30:19]) are ignored; the
// linter reports them as unused, which is intended.
module ci_regs
  import fdc_pkg::*;
#(
  parameter int unsigned ADC_FIFO_DEPTH = 128,
  parameter int unsigned DAC_FIFO_DEPTH = 65536
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // custom instruction port
  input  logic                                 clk_en,
  input  logic                                 start,
  input  logic [7:0]                           n,
  input  logic [31:0]                          dataa,
  output logic [31:0]                          result,
  output logic                                 done,
  // settings of the loop
  output logic [N_TAPS-1:0]                    manual_control,
  output logic [N_TAPS-1:0][SHIFT_BITS-1:0]    step_shift,
  output logic [DAC_CH-1:0][DAC_BITS-1:0]      da_value_in,
  output logic                                 halt_en,
  // offset estimator
  output logic                                 offset_restart,
  input  logic [ADC_CH-1:0][ADC_BITS-1:0]      offset,
  input  logic                                 offset_valid,
  // words being written to the DAC
  input  logic [DAC_CH-1:0][DAC_BITS-1:0]      da_value_out,
  // ADC capture FIFO
  output logic                                 adc_fifo_flush,
  output logic                                 adc_fifo_pop,
  input  logic [ADC_CH-1:0][ADC_BITS-1:0]      adc_fifo_data,
  input  logic [$clog2(ADC_FIFO_DEPTH):0]      adc_fifo_count,
  // DAC capture FIFO
  output logic                                 dac_fifo_flush,
  output logic                                 dac_fifo_pop,
  input  logic [DAC_CH-1:0][DAC_BITS-1:0]      dac_fifo_data,
  input  logic [$clog2(DAC_FIFO_DEPTH):0]      dac_fifo_count,
  // status word returned by CI_READ_STATUS; status_read pulses with it
  input  logic [31:0]                          status,
  output logic                                 status_read
);

  logic go;
  assign go = clk_en && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result         <= '0;
      done           <= 1'b0;
      manual_control <= '1;
      step_shift     <= '0;
      halt_en        <= 1'b0;
      for (int k = 0; k < DAC_CH; k++) da_value_in[k] <= DAC_BITS'(1 << (DAC_BITS-1));
      offset_restart <= 1'b0;
      adc_fifo_flush <= 1'b0;
      adc_fifo_pop   <= 1'b0;
      dac_fifo_flush <= 1'b0;
      dac_fifo_pop   <= 1'b0;
      status_read    <= 1'b0;
    end else begin
      done           <= go;
      offset_restart <= 1'b0;
      adc_fifo_flush <= 1'b0;
      adc_fifo_pop   <= 1'b0;
      dac_fifo_flush <= 1'b0;
      dac_fifo_pop   <= 1'b0;
      status_read    <= 1'b0;
      if (go) begin
        result <= '0;
        case (n)
          CI_ALL_AUTO:      manual_control <= '0;
          CI_ALL_MANUAL:    manual_control <= '1;
          CI_SET_MANUAL:    manual_control <= dataa[N_TAPS-1:0];
          CI_SET_STEP:      if (dataa[9:8] < 2'(N_TAPS)) step_shift[dataa[9:8]] <= dataa[SHIFT_BITS-1:0];
          CI_SET_DA_VALUE:  if (dataa[18:16] < 3'(DAC_CH)) da_value_in[dataa[18:16]] <= dataa[15:0];
          CI_SET_HALT:      halt_en <= dataa[0];
          CI_READ_DA_VALUE: if (dataa[2:0] < 3'(DAC_CH)) result <= 32'(da_value_out[dataa[2:0]]);
          CI_OFFSET_RESTART: offset_restart <= 1'b1;
          CI_READ_OFFSET:   result <= {offset_valid, 19'(0), offset[dataa[2:0]]};
          CI_ADC_FIFO_FLUSH: adc_fifo_flush <= 1'b1;
          CI_ADC_FIFO_READ: begin
            result       <= 32'(adc_fifo_data[dataa[2:0]]);
            adc_fifo_pop <= dataa[31];
          end
          CI_ADC_FIFO_COUNT: result <= 32'(adc_fifo_count);
          CI_DAC_FIFO_FLUSH: dac_fifo_flush <= 1'b1;
          CI_DAC_FIFO_READ: begin
            if (dataa[2:0] < 3'(DAC_CH)) result <= 32'(dac_fifo_data[dataa[2:0]]);
            dac_fifo_pop <= dataa[31];
          end
          CI_DAC_FIFO_COUNT: result <= 32'(dac_fifo_count);
          CI_READ_STATUS: begin
            result      <= status;
            status_read <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
