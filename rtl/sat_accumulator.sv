// Saturating accumulator holding one filter weight.
//
// On each cycle with en high the input is added to the running sum. Overflow
// is detected from the signs: two operands of equal sign whose sum has the
// other sign would have wrapped, and then the sum is set to the largest
// value of the operands' sign instead. The weight leaves as the OUT_BITS
// most significant bits of the sum (25 to 16 bits, the DAC width). All this
// follows the published design. clear empties the sum, so that a tap that
// returns from manual to automatic control starts from the vector
// modulator's null point, as published; clear has priority over en (own
// choice). Output is the register itself: a new weight is visible one cycle
// after the enable.
module sat_accumulator #(
  parameter int unsigned IN_BITS  = 25,
  parameter int unsigned OUT_BITS = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       en,
  input  logic signed [IN_BITS-1:0]  data,
  output logic signed [OUT_BITS-1:0] result,
  output logic                       saturated  // pulses when a sum was clipped
);

  localparam logic signed [IN_BITS-1:0] POS_MAX = {1'b0, {(IN_BITS-1){1'b1}}};
  localparam logic signed [IN_BITS-1:0] NEG_MAX = {1'b1, {(IN_BITS-1){1'b0}}};

  logic signed [IN_BITS-1:0] sum, next;
  logic pos_ovf, neg_ovf;

  always_comb begin
    next    = sum + data;
    neg_ovf = sum[IN_BITS-1] && data[IN_BITS-1] && !next[IN_BITS-1];
    pos_ovf = !sum[IN_BITS-1] && !data[IN_BITS-1] && next[IN_BITS-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      saturated <= 1'b0;
    end else begin
      saturated <= 1'b0;
      if (clear) sum <= '0;
      else if (en) begin
        if (neg_ovf)      begin sum <= NEG_MAX; saturated <= 1'b1; end
        else if (pos_ovf) begin sum <= POS_MAX; saturated <= 1'b1; end
        else              sum <= next;
      end
    end
  end

  assign result = sum[IN_BITS-1 -: OUT_BITS];

endmodule
