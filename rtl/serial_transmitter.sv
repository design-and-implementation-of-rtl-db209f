// Serial transmitter: multiplexes the code word onto a single line.
//
// While ten (transmitter enable) is high, a bit counter steps through the
// code positions 1, 2, ..., FRAME_W, one per clock, and the multiplexer puts
// h[counter] on the line mh; after position FRAME_W it starts the next frame
// at position 1, so a steady enable repeats the word. While ten is low the
// counter returns to position 1 and the line is held at 0.
//
// Timing: the first clock cycle with ten high carries position 1; position n
// is on the line during the n-th enabled cycle. A receiver enabled on the
// same cycle therefore stores position n on the n-th rising edge.
//
// The multiplexer and its enable come from the transmitter-enable port of
// the reference design. Bit order (position 1 first), the free-running
// repetition and the idle level are this design's choices.
module serial_transmitter #(
  parameter int unsigned FRAME_W = 12,
  localparam int unsigned CNT_W  = $clog2(FRAME_W + 1)
) (
  input  logic               clk,
  input  logic               ten,
  input  logic [FRAME_W:1]   h,
  output logic               mh
);

  logic [CNT_W-1:0] idx;   // code position on the line, 1..FRAME_W

  always_ff @(posedge clk) begin
    if (!ten || idx == CNT_W'(FRAME_W))
      idx <= CNT_W'(1);
    else
      idx <= idx + CNT_W'(1);
  end

  always_comb begin
    mh = 1'b0;
    for (int unsigned pos = 1; pos <= FRAME_W; pos++)
      if (ten && idx == CNT_W'(pos)) mh = h[pos];
  end

endmodule
