// Syndrome decoder (the 4-to-16 decoder of the receiver).
//
// A plain binary-to-one-hot decoder: exactly one output is high, y[sel].
// y[0] means "no error"; y[n] for n >= 1 enables the correcting XOR gate of
// code position n. For the 7-bit data word SEL_W is 4 (a 4-to-16 decoder, of
// which Y1..Y11 reach a gate); for the 4-bit word it is 3 (3-to-8, Y1..Y7).
//
// Interface: sel is the syndrome C; y is one-hot. Purely combinational.
module syndrome_decoder #(
  parameter int unsigned SEL_W = 4
) (
  input  logic [SEL_W-1:0]     sel,
  output logic [2**SEL_W-1:0]  y
);

  always_comb begin
    y = '0;
    y[sel] = 1'b1;
  end

endmodule
