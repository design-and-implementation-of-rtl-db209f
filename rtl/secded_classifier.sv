// SEC-DED decision: classifies the received word from the checker bits.
//
// With SECDED set it applies the three conditions of the decoding flowchart,
// where C is the syndrome and 'overall' the overall parity check:
//   C = 0  and overall = 0  -> no error, valid information
//   C != 0 and overall = 1  -> single bit error, corrected, valid information
//   C != 0 and overall = 0  -> double bit error, invalid information
// A word that meets none of these (C = 0 and overall = 1) follows the
// flowchart's final "no" branch to invalid information; it is reported as
// ST_UNCLASSIFIED and not corrected. correct_en enables the correcting XOR
// gates only for a single error.
//
// With SECDED clear (plain Hamming code, no overall parity bit) every
// non-zero syndrome is taken as a single error and corrected.
//
// Purely combinational.
module secded_classifier
  import hamming_pkg::*;
#(
  parameter bit SECDED = 1'b1
) (
  input  logic    syndrome_nz,
  input  logic    overall,
  output status_e status,
  output logic    valid,
  output logic    correct_en
);

  always_comb begin
    if (!SECDED)
      status = syndrome_nz ? ST_SINGLE : ST_NO_ERROR;
    else if (!syndrome_nz && !overall)
      status = ST_NO_ERROR;
    else if (syndrome_nz && overall)
      status = ST_SINGLE;
    else if (syndrome_nz && !overall)
      status = ST_DOUBLE;
    else
      status = ST_UNCLASSIFIED;
    valid      = (status == ST_NO_ERROR) || (status == ST_SINGLE);
    correct_en = (status == ST_SINGLE);
  end

endmodule
