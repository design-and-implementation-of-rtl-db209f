// Hamming encoder (parity bit generator and code word assembly).
//
// The data word is spread over the code positions that are not powers of two,
// D1 at position 3, D2 at 5, D3 at 6, D4 at 7, D5 at 9, D6 at 10, D7 at 11.
// Each parity bit Pj (j = 1, 2, 4, 8) is the XOR of the data positions whose
// index has bit j set, which gives even parity over its group. For seven
// data bits this is
//   P1 = D1^D2^D4^D5^D7   P2 = D1^D3^D4^D6^D7   P4 = D2^D3^D4   P8 = D5^D6^D7.
// With SECDED set, the overall parity bit P9, the XOR of all Hamming bits, is
// appended as the top bit so that the whole word has even parity.
//
// Interface: data[k] is Dk (k = 1..DATA_W); code[n] is code position n, and
// code[CODE_W+1] is P9 when SECDED is set. Purely combinational.
//
// The bit placement, the parity equations and the overall parity bit are the
// standard scheme as described for the 7-bit word; DATA_W = 4 with SECDED = 0
// gives the smaller (7,4) encoder (P1 = D1^D2^D4, P2 = D1^D3^D4,
// P4 = D2^D3^D4). Making the widths parameters is this design's choice.
module hamming_encoder
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = 7,
  parameter bit          SECDED = 1'b1,
  localparam int unsigned PAR_W  = parity_bits(DATA_W),
  localparam int unsigned CODE_W = DATA_W + PAR_W,
  localparam int unsigned OUT_W  = CODE_W + (SECDED ? 1 : 0)
) (
  input  logic [DATA_W:1] data,
  output logic [OUT_W:1]  code
);

  logic [CODE_W:1] hw;   // Hamming word without the overall parity bit

  always_comb begin
    int unsigned k;
    hw = '0;
    // place the data bits
    k = 1;
    for (int unsigned pos = 1; pos <= CODE_W; pos++) begin
      if (!is_pow2(pos)) begin
        hw[pos] = data[k];
        k++;
      end
    end
    // parity bit generator
    for (int unsigned j = 0; j < PAR_W; j++) begin
      for (int unsigned pos = 1; pos <= CODE_W; pos++) begin
        if (!is_pow2(pos) && ((pos >> j) & 1) == 1)
          hw[1 << j] = hw[1 << j] ^ hw[pos];
      end
    end
  end

  if (SECDED) begin : g_secded
    assign code = {^hw, hw};
  end else begin : g_plain
    assign code = hw;
  end

endmodule
