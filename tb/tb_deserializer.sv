// Self-checking test of deserializer: random 12-bit frames are fed as six
// (low, high) bit pairs per frame, MSB first, one pair per bit-clock
// period; the system clock runs at one sixth of the bit clock with its
// rising edge on the bit-clock edge after the last pair of a frame has been
// shifted in. Each output word must equal the frame sent, one frame per
// system clock.
module tb_deserializer;
  localparam int CH = 8;
  int checks = 0, failures = 0;
  logic sclk = 0, pclk = 0, rst_n = 0;
  logic [CH-1:0] ddr_low = '0, ddr_high = '0;
  logic [CH-1:0][11:0] data_out;
  logic [CH-1:0][11:0] frames [0:1023];
  int pair = 0, frame_tx = 0, frame_rx = 0;

  deserializer #(.CH(CH), .BITS(12)) dut (.sclk, .pclk, .rst_n, .ddr_low, .ddr_high, .data_out);

  // sclk rising edges at 10n+5; pair k of frame f is presented before edge
  // 6f+k. The frame is complete after edge 6f+5 and read at edge 6f+6, so
  // pclk rises at 10(6f+6)+5 = 60f+65.
  always #5 sclk = ~sclk;
  initial begin
    #65;
    forever begin pclk = 1; #30; pclk = 0; #30; end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (frames[f]) for (int c = 0; c < CH; c++) frames[f][c] = 12'($urandom);
    rst_n = 0;
    #2 rst_n = 1;
  end

  // Present pair 'pair' of frame 'frame_tx' while sclk is low.
  always @(negedge sclk or posedge rst_n) begin
    for (int c = 0; c < CH; c++) begin
      ddr_low[c]  = frames[frame_tx][c][11 - 2*pair];
      ddr_high[c] = frames[frame_tx][c][10 - 2*pair];
    end
    if (pair == 5) begin pair = 0; frame_tx++; end
    else pair++;
  end

  always @(posedge pclk) begin
    #1;
    checks++;
    if (data_out != frames[frame_rx]) begin
      failures++;
      if (failures < 10) $display("FAIL frame %0d got %h exp %h", frame_rx, data_out, frames[frame_rx]);
    end
    frame_rx++;
    if (frame_rx == 1000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
