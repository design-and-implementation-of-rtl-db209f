// Seven-segment driver for the error display.
//
// Shows a 4-bit value as one hexadecimal digit (0-9, A, b, C, d, E, F). At
// the receiver the value is the syndrome C, so the digit is the code
// position of a single error (B for position 11) and 0 when no error was
// seen. Segments are active high, seg[0] = a through seg[6] = g in the usual
// clockwise-then-middle lettering. The 7-bit error display port is given by
// the reference design; what it shows and the segment coding are this
// design's choices. Purely combinational.
module seven_seg_display (
  input  logic [3:0] value,
  output logic [6:0] seg
);

  always_comb begin
    unique case (value)
      4'h0: seg = 7'b011_1111;
      4'h1: seg = 7'b000_0110;
      4'h2: seg = 7'b101_1011;
      4'h3: seg = 7'b100_1111;
      4'h4: seg = 7'b110_0110;
      4'h5: seg = 7'b110_1101;
      4'h6: seg = 7'b111_1101;
      4'h7: seg = 7'b000_0111;
      4'h8: seg = 7'b111_1111;
      4'h9: seg = 7'b110_1111;
      4'hA: seg = 7'b111_0111;
      4'hB: seg = 7'b111_1100;
      4'hC: seg = 7'b011_1001;
      4'hD: seg = 7'b101_1110;
      4'hE: seg = 7'b111_1001;
      4'hF: seg = 7'b111_0001;
    endcase
  end

endmodule
