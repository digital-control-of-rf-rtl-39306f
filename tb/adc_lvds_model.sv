// Behavioural model of the ADC's serial output and of the clock generator,
// for testbenches. Each frame period it takes one 12-bit word per channel
// from frame_in and sends it MSB first on the data lines, two bits per
// bit-clock period (DDR), 12 bits per frame. It also produces the two
// clocks the FPGA PLL would: the bit clock sclk, six per frame, with its
// rising edge a quarter period before the start of each frame, and the
// system clock pclk at the frame rate, rising on the bit-clock edge that
// follows the completion of a frame in the receiver's shift registers.
// frame_req toggles half a frame before frame_in is sampled.
module adc_lvds_model #(
  parameter real T  = 4.168,  // bit clock period in ns (240 MHz nominal)
  parameter int  CH = 8
) (
  input  logic [CH-1:0][11:0] frame_in,
  output logic                sclk,
  output logic                pclk,
  output logic [CH-1:0]       data,
  output logic                frame_req,
  output int                  frames_sent
);
  initial begin
    sclk = 0; pclk = 0; data = '0; frame_req = 0; frames_sent = 0;
  end

  // bit clock: rising at T/4 + nT
  initial begin
    #(T / 4);
    forever begin sclk = 1; #(T / 2); sclk = 0; #(T / 2); end
  end

  // system clock: rising at T/4 + 2T + 6mT
  initial begin
    #(T / 4 + 2 * T);
    forever begin pclk = 1; #(3 * T); pclk = 0; #(3 * T); end
  end

  // frames start at T/2 + 6mT; bit k is driven from T/2 + 6mT + kT/2
  initial begin
    logic [CH-1:0][11:0] w;
    #(T / 2);
    forever begin
      w = frame_in;
      frames_sent++;
      for (int k = 0; k < 12; k++) begin
        for (int c = 0; c < CH; c++) data[c] = w[c][11 - k];
        if (k == 6) frame_req = ~frame_req;
        #(T / 2);
      end
    end
  end
endmodule
