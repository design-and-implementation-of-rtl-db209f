// Checker bit generator of the Hamming receiver.
//
// Recomputes each parity group over the received word, this time including
// the parity bit itself: checker bit Cj+1 is the XOR of every received
// position whose index has bit j set. For the 11-bit word
//   C1 = R1^R3^R5^R7^R9^R11    C2 = R2^R3^R6^R7^R10^R11
//   C3 = R4^R5^R6^R7           C4 = R8^R9^R10^R11
// (Rn is received position n). Read as a binary number, C = C4C3C2C1 is the
// position of a single flipped bit, or 0 when every group checks.
//
// With SECDED set, 'overall' is the even-parity check over the whole received
// word, the 11 Hamming bits and the received P9 alike: it is 1 when an odd
// number of bits flipped. The three decision conditions of the receiver test
// this value. Without SECDED, 'overall' is 0.
//
// Interface: rx_code[n] is received position n; syndrome[j] is Cj+1.
// Purely combinational.
module checker_bit_generator
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = 7,
  parameter bit          SECDED = 1'b1,
  localparam int unsigned PAR_W  = parity_bits(DATA_W),
  localparam int unsigned CODE_W = DATA_W + PAR_W,
  localparam int unsigned OUT_W  = CODE_W + (SECDED ? 1 : 0)
) (
  input  logic [OUT_W:1]   rx_code,
  output logic [PAR_W-1:0] syndrome,
  output logic             overall
);

  always_comb begin
    syndrome = '0;
    for (int unsigned j = 0; j < PAR_W; j++)
      for (int unsigned pos = 1; pos <= CODE_W; pos++)
        if (((pos >> j) & 1) == 1)
          syndrome[j] = syndrome[j] ^ rx_code[pos];
  end

  if (SECDED) begin : g_secded
    assign overall = ^rx_code;
  end else begin : g_plain
    assign overall = 1'b0;
  end

endmodule
