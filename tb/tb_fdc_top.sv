// End-to-end test of fdc_top at reduced sizes (offset averaged over 2^8
// samples, 16-entry ADC and 32-entry DAC capture FIFOs) so that both FIFOs
// fill up; everything else at the design's sizes. See fdc_harness.
module tb_fdc_top;
  import fdc_pkg::*;
  localparam int unsigned L = 8, AD = 16, DD = 32;
  logic sclk, pclk, rst_n, ci_clk_en, ci_start, ci_done;
  logic [ADC_CH-1:0] lvds_data;
  logic [7:0] ci_n;
  logic [31:0] ci_dataa, ci_result;
  logic dac_sclk, dac_sdi, dac_sync_n, dac_ldac_n, dac_reset_n;

  fdc_top #(.OFFSET_LOG2_N(L), .ADC_FIFO_DEPTH(AD), .DAC_FIFO_DEPTH(DD)) dut (.*);

  fdc_harness #(.OFFSET_LOG2_N(L), .ADC_FIFO_DEPTH(AD), .DAC_FIFO_DEPTH(DD), .WATCHDOG_NS(64'd20_000_000)) h (.*);
endmodule
