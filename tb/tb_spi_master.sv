// Self-checking test of spi_master with a behavioural DAC on its SPI pins.
// Random automatic (tap) and manual (processor) words and random manual
// selections are applied for one update at a time; after each LDAC_N pulse
// the DAC outputs must hold the words chosen for the previous update, at the
// published channel addresses, with command 0001. It also checks the
// published timing: 162 clocks (4.05 us at 40 MHz) between LDAC_N pulses,
// SYNC_N high for 3 clocks between frames, six frames and one accumulator
// enable per update, and that halting stops SCK and the updates.
module tb_spi_master;
  import fdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, halt_en = 0;
  logic [5:0][15:0] control_data, da_value_in, da_value_out, expected, prev_expected;
  logic [2:0] manual_control;
  logic sck, sdo, sync_n, ldac_n, reset_n, acc_en;
  spi_state_t state;
  logic [15:0] dac_reg [8], input_reg [8];
  int frames, ldac_pulses, bad_frames;
  logic [3:0] last_cmd, last_addr;
  int cyc = 0, last_sync_rise = -1, acc_en_cnt = 0, halted_sck_edges = 0;
  bit halting = 0;

  spi_master dut (.clk, .rst_n, .control_data, .da_value_in, .da_value_out, .manual_control,
                  .halt_en, .sck, .sdo, .sync_n, .ldac_n, .reset_n, .acc_en, .state);

  ad5676_model dac (.sclk(sck), .sdi(sdo), .sync_n, .ldac_n, .reset_n, .dac_reg, .input_reg,
                    .frames, .ldac_pulses, .bad_frames, .last_cmd, .last_addr);

  always #12.5 clk = ~clk;   // 40 MHz

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_inputs();
    for (int k = 0; k < 6; k++) begin
      control_data[k] = 16'($urandom);
      da_value_in[k]  = 16'($urandom);
    end
    manual_control = 3'($urandom);
    for (int k = 0; k < 6; k++) expected[k] = manual_control[k/2] ? da_value_in[k] : control_data[k];
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (acc_en) acc_en_cnt <= acc_en_cnt + 1;
  end

  always @(posedge sck) if (state == S_HALT) halted_sck_edges++;

  // SYNC_N must stay high for 3 clocks between frames.
  always @(posedge sync_n) last_sync_rise = cyc;
  always @(negedge sync_n) if (last_sync_rise >= 0 && rst_n && !halting && cyc > 10) begin
    checks++;
    if (cyc - last_sync_rise != 3) begin
      failures++;
      $display("FAIL SYNC_N high for %0d cycles", cyc - last_sync_rise);
    end
  end

  initial begin
    int last_ldac, fr_prev;
    new_inputs();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge ldac_n);          // first update latches 'expected'
    last_ldac = cyc; fr_prev = frames; acc_en_cnt = 0;
    prev_expected = expected;
    @(negedge clk) new_inputs();
    for (int r = 1; r < 40; r++) begin
      @(negedge ldac_n);
      #1;
      // The DAC now outputs the words latched one update earlier.
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (dac_reg[DAC_ADDR[k]] != prev_expected[k]) begin
          failures++;
          $display("FAIL update %0d ch %0d addr %0d got %h exp %h", r, k, DAC_ADDR[k], dac_reg[DAC_ADDR[k]], prev_expected[k]);
        end
      end
      checks += 3;
      if (cyc - last_ldac != 162) begin failures++; $display("FAIL update period %0d cycles", cyc - last_ldac); end
      if (frames - fr_prev != 6) begin failures++; $display("FAIL %0d frames per update", frames - fr_prev); end
      if (acc_en_cnt != 1) begin failures++; $display("FAIL %0d accumulator enables per update", acc_en_cnt); end
      prev_expected = expected;
      @(negedge clk) new_inputs();
      if (r == 20) begin
        // Halt at the next SAMPLE state, hold, resume.
        halt_en = 1;
        halting = 1;
        repeat (600) @(negedge clk);
        checks += 2;
        if (state != S_HALT) begin failures++; $display("FAIL not halted"); end
        if (halted_sck_edges != 0) begin failures++; $display("FAIL SCK ran while halted"); end
        halt_en = 0;
        @(negedge ldac_n);      // resumed: this update latches 'expected'
        halting = 0;
        last_sync_rise = -1;   // the gap around a halt is not a frame gap
        prev_expected = expected;
        @(negedge clk) new_inputs();
      end
      last_ldac = cyc; fr_prev = frames; acc_en_cnt = 0;
    end
    checks++;
    if (bad_frames != 0 || last_cmd != DAC_CMD_WRITE_INPUT) begin
      failures++; $display("FAIL bad frames %0d cmd %b", bad_frames, last_cmd);
    end
    $display("updates %0d frames %0d", ldac_pulses, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
