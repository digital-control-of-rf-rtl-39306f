// End-to-end test of fdc_top with every parameter at its default: offset
// averaged over 2^16 samples, 128-entry ADC and 65536-entry DAC capture
// FIFOs. The same sequence as tb_fdc_top; the DAC FIFO does not fill here,
// its first entries are checked instead. See fdc_harness.
module tb_fdc_top_full;
  import fdc_pkg::*;
  logic sclk, pclk, rst_n, ci_clk_en, ci_start, ci_done;
  logic [ADC_CH-1:0] lvds_data;
  logic [7:0] ci_n;
  logic [31:0] ci_dataa, ci_result;
  logic dac_sclk, dac_sdi, dac_sync_n, dac_ldac_n, dac_reset_n;

  fdc_top dut (.*);

  fdc_harness #(.WATCHDOG_NS(64'd60_000_000)) h (.*);
endmodule
