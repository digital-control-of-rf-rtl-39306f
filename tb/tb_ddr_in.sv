// Self-checking test of ddr_in: random bits are driven on each line, two per
// bit-clock period, each held for half a period and centred on the clock
// edge that samples it (first bit on the falling edge, second on the rising
// edge). After each rising edge ddr_low must hold the first bit and
// ddr_high the second bit of the pair just received.
module tb_ddr_in;
  int checks = 0, failures = 0;
  logic sclk = 0, rst_n = 0;
  logic [7:0] data_in = '0, ddr_low, ddr_high;
  logic [7:0] first_q, second_q;

  ddr_in #(.CH(8)) dut (.sclk, .rst_n, .data_in, .ddr_low, .ddr_high);

  // sclk rises at 8n, falls at 8n+4; data changes at 8n+2 and 8n+6.
  always #4 sclk = ~sclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(posedge sclk);         // t = 24
    #2;                      // t = 26
    for (int n = 0; n < 2000; n++) begin
      first_q = 8'($urandom);
      data_in = first_q;     // valid around the falling edge at +2
      #4;
      second_q = 8'($urandom);
      data_in = second_q;    // valid around the rising edge at +2
      #3;                    // 1 after the rising edge
      checks++;
      if (ddr_low != first_q || ddr_high != second_q) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d low=%h exp %h high=%h exp %h", n, ddr_low, first_q, ddr_high, second_q);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
