// bcd_pkg: types and helper functions shared by the fast BCD adder and the
// BCD multiplier.
//
// A decimal digit travels through the datapath in two forms:
//   * bcd_digit_t : plain 8421 BCD, 0..9.
//   * sd_code_t   : the signed 4-bit "column code". Digits 0..5 keep their
//                   binary pattern; digits 6..9 are replaced by the 4-bit
//                   two's complement of (digit - 10), i.e. 1100..1111.
//                   Partial sums inside a column may also hold 0110 and 0111,
//                   which stand for 6 and 7. In general a code S is worth
//                   S - 6*S[3] (so 1100 = 12 - 6 = 6, 0111 = 7).
// sd_decode() maps every code the datapath can produce back to BCD.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;
  typedef logic [3:0] sd_code_t;

  // Adjustment case chosen by the digit adder (overflow / sign of the sum).
  typedef enum logic [1:0] {
    CASE_I   = 2'd0,  // overflow, sum positive : add 1010, drop that carry
    CASE_II  = 2'd1,  // overflow, sum negative : add 0110, keep that carry
    CASE_III = 2'd2,  // no overflow, sum positive : no change
    CASE_IV  = 2'd3   // no overflow, sum negative : add 1010 if not a valid code
  } adj_case_e;

  // Digit (0..9) to column code, the recoding table of the algorithm.
  function automatic sd_code_t sd_encode(input bcd_digit_t d);
    return (d > 4'd5) ? sd_code_t'(d + 4'd6) : sd_code_t'(d);
  endfunction

  // Column code to digit: S - 6 when the sign bit is set.
  function automatic bcd_digit_t sd_decode(input sd_code_t s);
    return s[3] ? bcd_digit_t'(s - 4'd6) : bcd_digit_t'(s);
  endfunction

endpackage
