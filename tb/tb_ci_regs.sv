// Self-checking test of ci_regs: issues custom instructions and checks the
// settings they produce (automatic/manual control with the published
// instruction 40, step sizes, manual DAC words, halt), the one-cycle strobes
// (offset restart, FIFO flushes with the published instruction 65, pops,
// status read),
// the read-backs and the done handshake one cycle after each instruction.
module tb_ci_regs;
  import fdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clk_en = 0, start = 0;
  logic [7:0] n = 0;
  logic [31:0] dataa = 0, result, status;
  logic done;
  logic [2:0] manual_control;
  logic [2:0][4:0] step_shift;
  logic [5:0][15:0] da_value_in, da_value_out, dac_fifo_data;
  logic halt_en, offset_restart, offset_valid, status_read;
  logic [7:0][11:0] offset, adc_fifo_data;
  logic adc_fifo_flush, adc_fifo_pop, dac_fifo_flush, dac_fifo_pop;
  logic [7:0] adc_fifo_count;
  logic [16:0] dac_fifo_count;
  int strobes [string];

  ci_regs dut (.clk, .rst_n, .clk_en, .start, .n, .dataa, .result, .done,
               .manual_control, .step_shift, .da_value_in, .halt_en,
               .offset_restart, .offset, .offset_valid, .da_value_out,
               .adc_fifo_flush, .adc_fifo_pop, .adc_fifo_data, .adc_fifo_count,
               .dac_fifo_flush, .dac_fifo_pop, .dac_fifo_data, .dac_fifo_count, .status,
               .status_read);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (offset_restart) strobes["restart"]++;
    if (adc_fifo_flush) strobes["adc_flush"]++;
    if (adc_fifo_pop)   strobes["adc_pop"]++;
    if (dac_fifo_flush) strobes["dac_flush"]++;
    if (dac_fifo_pop)   strobes["dac_pop"]++;
    if (status_read)    strobes["status_read"]++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One custom instruction; returns its result.
  task automatic ci(input logic [7:0] num, input logic [31:0] a, output logic [31:0] r);
    @(negedge clk);
    clk_en = 1; start = 1; n = num; dataa = a;
    @(negedge clk);
    clk_en = 0; start = 0;
    check(done == 1'b1, $sformatf("done after instruction %0d", num));
    r = result;
    @(negedge clk);
    check(done == 1'b0, "done is one cycle");
  endtask

  initial begin
    logic [31:0] r;
    for (int k = 0; k < 8; k++) begin offset[k] = 12'($urandom); adc_fifo_data[k] = 12'($urandom); end
    for (int k = 0; k < 6; k++) begin da_value_out[k] = 16'($urandom); dac_fifo_data[k] = 16'($urandom); end
    offset_valid = 1; adc_fifo_count = 8'd77; dac_fifo_count = 17'd65536; status = 32'h1234abcd;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(manual_control == 3'b111 && halt_en == 0, "reset state");
    for (int k = 0; k < 6; k++) check(da_value_in[k] == 16'h8000, "reset manual word is mid-scale");
    ci(CI_ALL_AUTO, 0, r);        check(manual_control == 3'b000, "instruction 40 sets all automatic");
    ci(CI_ALL_MANUAL, 0, r);      check(manual_control == 3'b111, "all manual");
    ci(CI_SET_MANUAL, 32'b101, r); check(manual_control == 3'b101, "manual per tap");
    for (int t = 0; t < 3; t++) begin
      logic [4:0] s;
      s = 5'($urandom_range(0, 16));
      ci(CI_SET_STEP, {22'(0), 2'(t), 3'(0), s}, r);
      check(step_shift[t] == s, $sformatf("step of tap %0d", t));
    end
    for (int k = 0; k < 6; k++) begin
      logic [15:0] w;
      w = 16'($urandom);
      ci(CI_SET_DA_VALUE, {13'(0), 3'(k), w}, r);
      check(da_value_in[k] == w, $sformatf("manual word %0d", k));
      ci(CI_READ_DA_VALUE, 32'(k), r);
      check(r == 32'(da_value_out[k]), $sformatf("read DAC word %0d", k));
    end
    ci(CI_SET_HALT, 1, r);        check(halt_en == 1, "halt");
    ci(CI_SET_HALT, 0, r);        check(halt_en == 0, "resume");
    ci(CI_OFFSET_RESTART, 0, r);
    for (int k = 0; k < 8; k++) begin
      ci(CI_READ_OFFSET, 32'(k), r);
      check(r == {1'b1, 19'(0), offset[k]}, $sformatf("offset %0d", k));
      ci(CI_ADC_FIFO_READ, 32'(k) | (k == 7 ? 32'h8000_0000 : 0), r);
      check(r == 32'(adc_fifo_data[k]), $sformatf("ADC FIFO channel %0d", k));
    end
    for (int k = 0; k < 6; k++) begin
      ci(CI_DAC_FIFO_READ, 32'(k) | (k == 5 ? 32'h8000_0000 : 0), r);
      check(r == 32'(dac_fifo_data[k]), $sformatf("DAC FIFO channel %0d", k));
    end
    ci(CI_ADC_FIFO_COUNT, 0, r);  check(r == 77, "ADC FIFO count");
    ci(CI_DAC_FIFO_COUNT, 0, r);  check(r == 65536, "DAC FIFO count");
    ci(CI_ADC_FIFO_FLUSH, 0, r);
    ci(CI_DAC_FIFO_FLUSH, 0, r);
    ci(CI_READ_STATUS, 0, r);     check(r == 32'h1234abcd, "status");
    // clk_en low: nothing happens
    @(negedge clk); start = 1; n = CI_ALL_AUTO; @(negedge clk); start = 0;
    check(manual_control == 3'b101, "ignored without clk_en");
    check(strobes["restart"] == 1 && strobes["adc_flush"] == 1 && strobes["dac_flush"] == 1 &&
          strobes["adc_pop"] == 1 && strobes["dac_pop"] == 1 && strobes["status_read"] == 1,
          "one-cycle strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
