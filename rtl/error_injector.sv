// Transmission medium with error injection.
//
// Models the channel between transmitter and receiver: the bit on the serial
// line is inverted in every clock cycle in which err is high, so a one-cycle
// pulse on err corrupts exactly one code position and two pulses in one frame
// corrupt two. The error-introducing input comes from the reference design;
// that it acts by inverting the line bit for as long as it is high is this
// design's reading. Purely combinational.
module error_injector (
  input  logic line_in,
  input  logic err,
  output logic line_out
);

  assign line_out = line_in ^ err;

endmodule
