// Capture FIFO for the debug read-out of ADC samples and DAC words.
//
// Two of these sit beside the control loop without affecting it: one holds
// 128 consecutive ADC frames (all channels, written every cycle), the other
// 65536 consecutive sets of DAC control words (written once per DAC update,
// 265 ms of history), as published. The buffer starts capturing when it is
// empty and stops when it is full, so after a flush it records the next
// DEPTH writes as one unbroken segment, and it only starts again once the
// reader has drained it completely. The reader sees the oldest entry on
// rd_data and removes it with rd_pop. Storage is a plain array with
// asynchronous read; pointers wrap at DEPTH (a power of two). The
// arm-on-empty rule is published for the DAC buffer and used for both here.
module capture_fifo #(
  parameter int unsigned WIDTH = 96,
  parameter int unsigned DEPTH = 128      // power of two
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,     // discard everything, start a new capture
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_pop,
  output logic [WIDTH-1:0]           rd_data,   // oldest entry
  output logic [$clog2(DEPTH):0]     count,
  output logic                       full,
  output logic                       empty,
  output logic                       capturing
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && capturing && !full && !flush;
  assign do_rd   = rd_pop && !empty && !flush;
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      capturing <= 1'b1;
    end else if (flush) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      capturing <= 1'b1;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      // Arm when the buffer is drained, disarm when a segment is complete.
      if (empty && !do_wr)                              capturing <= 1'b1;
      else if (do_wr && !do_rd && count == (AW+1)'(DEPTH-1)) capturing <= 1'b0;
    end
  end

  a_no_overflow: assert property (@(posedge clk) full |-> !do_wr);

endmodule
