// Serial receiver: demultiplexes the line back into a parallel code word.
//
// While ren (receiver enable) is high, a bit counter steps through the code
// positions 1, 2, ..., FRAME_W, one per clock, and the demultiplexer stores
// the line bit into dmh[counter] on the rising edge. After position FRAME_W
// it starts again at position 1. While ren is low the counter returns to
// position 1 and dmh keeps its contents.
//
// Timing: enabled on the same cycle as the transmitter, the receiver stores
// position n on the n-th enabled edge. frame_done is a registered pulse, high
// in the cycle after the edge that stored position FRAME_W, that is, when
// dmh first holds the whole frame. dmh is not reset: it holds no meaningful
// value before the first frame_done.
//
// The demultiplexer and its enable come from the receiver-enable port of the
// reference design; the counter, the frame_done pulse and the bit order are
// this design's choices.
module serial_receiver #(
  parameter int unsigned FRAME_W = 12,
  localparam int unsigned CNT_W  = $clog2(FRAME_W + 1)
) (
  input  logic               clk,
  input  logic               ren,
  input  logic               line,
  output logic [FRAME_W:1]   dmh,
  output logic               frame_done
);

  logic [CNT_W-1:0] idx;   // code position stored on the next edge

  always_ff @(posedge clk) begin
    if (!ren || idx == CNT_W'(FRAME_W))
      idx <= CNT_W'(1);
    else
      idx <= idx + CNT_W'(1);
    frame_done <= ren && (idx == CNT_W'(FRAME_W));
  end

  always_ff @(posedge clk) begin
    for (int unsigned pos = 1; pos <= FRAME_W; pos++)
      if (ren && idx == CNT_W'(pos)) dmh[pos] <= line;
  end

endmodule
