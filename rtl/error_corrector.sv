// Error corrector: the bank of XOR gates at the receiver output.
//
// Code position n passes through an XOR gate whose other input is decoder
// output Yn, so the one bit the syndrome points at is inverted and all others
// pass unchanged. Decoder outputs Y0 ("no error") and those above CODE_W
// reach no gate. The 'enable' input gates all XORs; the SEC-DED decision uses
// it to leave a word with a detected double error as received. Tying it high
// gives the ungated circuit of the plain Hamming decoder.
//
// Interface: rx_code[n] / corrected[n] are code position n; sel is one-hot
// Y0..Y(2^PAR_W-1). Purely combinational.
module error_corrector #(
  parameter int unsigned CODE_W = 11,
  parameter int unsigned SEL_N  = 16
) (
  input  logic [CODE_W:1]    rx_code,
  input  logic [SEL_N-1:0]   sel,
  input  logic               enable,
  output logic [CODE_W:1]    corrected
);

  always_comb begin
    for (int unsigned pos = 1; pos <= CODE_W; pos++)
      corrected[pos] = rx_code[pos] ^ (enable & sel[pos]);
  end

endmodule
