// DC offset estimation and removal for the ADC channels.
//
// The ADC has an offset error of up to +-20 mV, which degrades the LMS loop,
// so the offset of each channel is estimated as the mean of 2^LOG2_N
// successive samples (2^16 in the published design) and subtracted from every
// sample. After reset or a restart request, a counter runs over 2^LOG2_N
// samples while a per-channel accumulator sums them; at the end the sum
// shifted right by LOG2_N becomes the channel's offset and offset_valid is
// set. The estimate is then held until the next restart; until the first
// estimate exists the offset is zero. The difference is saturated to the
// sample width and registered, so data_out follows data_in by one cycle.
// The one-shot estimate, the saturation and the zero offset before the first
// estimate are own choices; the mean over 2^16 samples is the published one.
module offset_remove #(
  parameter int unsigned CH     = 8,   // channels
  parameter int unsigned BITS   = 12,  // sample width (two's complement)
  parameter int unsigned LOG2_N = 16   // log2 of the samples averaged
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          restart,       // start a new estimate
  input  logic [CH-1:0][BITS-1:0]       data_in,       // signed samples
  output logic [CH-1:0][BITS-1:0]       data_out,      // signed, offset removed
  output logic [CH-1:0][BITS-1:0]       offset,        // current estimates
  output logic                          offset_valid   // an estimate is in use
);

  localparam int unsigned SUM_BITS = BITS + LOG2_N;
  localparam logic signed [BITS:0] MAXV = (BITS+1)'((1 << (BITS-1)) - 1);
  localparam logic signed [BITS:0] MINV = -(BITS+1)'(1 << (BITS-1));

  logic [LOG2_N-1:0]                  count;
  logic                               busy;
  logic signed [SUM_BITS-1:0]         sum [CH];
  logic signed [SUM_BITS-1:0]         total [CH];  // sum including the current sample
  logic signed [BITS:0]               diff [CH];   // sample minus offset, one bit wider

  always_comb begin
    for (int c = 0; c < CH; c++) begin
      total[c] = sum[c] + SUM_BITS'(signed'(data_in[c]));
      diff[c]  = (BITS+1)'(signed'(data_in[c])) - (BITS+1)'(signed'(offset[c]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      busy         <= 1'b1;
      offset       <= '0;
      offset_valid <= 1'b0;
      for (int c = 0; c < CH; c++) sum[c] <= '0;
    end else if (restart) begin
      count <= '0;
      busy  <= 1'b1;
      for (int c = 0; c < CH; c++) sum[c] <= '0;
    end else if (busy) begin
      count <= count + 1'b1;
      if (count == '1) begin
        // Last sample: store the mean, keep the previous estimate until now.
        busy         <= 1'b0;
        offset_valid <= 1'b1;
        for (int c = 0; c < CH; c++) offset[c] <= BITS'(total[c] >>> LOG2_N);
      end else begin
        for (int c = 0; c < CH; c++) sum[c] <= total[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else begin
      for (int c = 0; c < CH; c++) begin
        if (diff[c] > MAXV)      data_out[c] <= MAXV[BITS-1:0];
        else if (diff[c] < MINV) data_out[c] <= MINV[BITS-1:0];
        else                     data_out[c] <= diff[c][BITS-1:0];
      end
    end
  end

endmodule
