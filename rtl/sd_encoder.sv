// sd_encoder: recodes one BCD digit into the signed 4-bit column code.
//
// Digits 0..5 keep their binary value. Digits 6, 7, 8 and 9 become the 4-bit
// two's complement of -4, -3, -2 and -1 (digit minus ten): 1100, 1101, 1110,
// 1111. The mapping is the one the addition method is built on; this module
// implements it as a compare and an add of 6, which gives the same table.
// Purely combinational, no latency. Inputs above 9 are not BCD and give a
// meaningless code.
module sd_encoder
  import bcd_pkg::*;
(
  input  bcd_digit_t digit_i,
  output sd_code_t   code_o
);

  always_comb code_o = sd_encode(digit_i);

endmodule
