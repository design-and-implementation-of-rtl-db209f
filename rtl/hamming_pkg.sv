// Shared constants, helper functions and the decision type of the Hamming
// SEC-DED (single error correction, double error detection) code.
//
// Code positions are numbered from 1. Positions that are powers of two
// (1, 2, 4, 8, ...) carry parity bits; all others carry data bits in rising
// order, so for seven data bits the 11-bit Hamming word reads, from position
// 11 down to 1: D7 D6 D5 P8 D4 D3 D2 P4 D1 P2 P1. Parity bit Pj is the even
// parity of every position whose index has bit j set. The SEC-DED form
// appends one more bit, the overall parity P9, at position 12.
package hamming_pkg;

  // Number of parity bits P for X data bits: the smallest P with 2^P >= X+P+1.
  function automatic int unsigned parity_bits(input int unsigned data_w);
    for (int unsigned p = 1; p < 31; p++)
      if ((32'd1 << p) >= data_w + p + 1) return p;
    return 31;
  endfunction

  // True for code positions that carry a parity bit.
  function automatic bit is_pow2(input int unsigned n);
    return (n != 0) && ((n & (n - 1)) == 0);
  endfunction

  // Outcome of the receiver's check, following the decision flowchart:
  //   ST_NO_ERROR      C = 0 and overall parity check = 0: valid as received
  //   ST_SINGLE        C != 0 and overall check = 1: one bit in error, corrected
  //   ST_DOUBLE        C != 0 and overall check = 0: two bits in error, invalid
  //   ST_UNCLASSIFIED  C = 0 and overall check = 1: matches none of the three
  //                    conditions, so it takes the flowchart's last "no" path
  //                    to "invalid information"
  typedef enum logic [1:0] {
    ST_NO_ERROR     = 2'd0,
    ST_SINGLE       = 2'd1,
    ST_DOUBLE       = 2'd2,
    ST_UNCLASSIFIED = 2'd3
  } status_e;

endpackage
