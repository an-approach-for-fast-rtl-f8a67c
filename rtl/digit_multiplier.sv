// digit_multiplier: multiplies two BCD digits and returns the product as two
// BCD digits, r (tens) and s (units), 0 <= r, s <= 9.
//
// The method only needs the two-digit product x*m = 10*r + s; how it is
// formed is this design's choice: a 4x4 binary multiply (at most 81) followed
// by a split into tens and units by comparison against 10, 20, ... 80.
// Purely combinational.
module digit_multiplier
  import bcd_pkg::*;
(
  input  bcd_digit_t x_i,
  input  bcd_digit_t m_i,
  output bcd_digit_t r_o,   // tens digit of the product
  output bcd_digit_t s_o    // units digit of the product
);

  logic [6:0] prod;

  always_comb begin
    prod = 7'(x_i) * 7'(m_i);
    r_o  = '0;
    for (int t = 1; t <= 8; t++) begin
      if (prod >= 7'(10 * t)) r_o = bcd_digit_t'(t);
    end
    s_o = bcd_digit_t'(prod - 7'(r_o) * 7'd10);
  end

endmodule
