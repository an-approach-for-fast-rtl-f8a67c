// sd_digit_adder: adds two 4-bit column codes and corrects the sum so that it
// is again a column code, returning the decimal carry separately.
//
// How it works: the two codes are added as 4-bit numbers. The carry out of
// bit 3 and the two's-complement overflow (carry into bit 3 differs from the
// carry out of it) pick one of four cases:
//   case i   overflow, sum positive    : add 1010, carry of that add dropped
//   case ii  overflow, sum negative    : add 0110, carry of that add kept
//   case iii no overflow, sum positive : no change
//   case iv  no overflow, sum negative : add 1010, carry of that add dropped
// The decimal carry is the carry out of the first add plus, in case ii, the
// carry out of the correction. At most one of the two can be set, so carry_o
// is one bit.
//
// Design choice: case iv is applied only when the negative sum is 1000..1011.
// Those four patterns are not column codes; 1100..1111 already are (digits
// 6..9) and are left as they are, which is what the method's worked examples
// do with sums such as 1111 and 1101. Case iii likewise keeps 0110 and 0111
// (worth 6 and 7). Case i cannot occur when both inputs are codes that this
// datapath produces; it is built anyway as the method states it.
//
// Interface: a_i, b_i codes; sum_o code; carry_o decimal carry (worth ten);
// case_o the case taken, for observation. Purely combinational.
module sd_digit_adder
  import bcd_pkg::*;
(
  input  sd_code_t  a_i,
  input  sd_code_t  b_i,
  output sd_code_t  sum_o,
  output logic      carry_o,
  output adj_case_e case_o
);

  logic       carry_into3; // carry from bit 2 into the sign bit
  logic [4:0] raw_sum;    // 4-bit sum and the carry out of bit 3
  logic       overflow;
  logic [4:0] corr_sum;

  always_comb begin
    raw_sum     = {1'b0, a_i} + {1'b0, b_i};
    carry_into3 = raw_sum[3] ^ a_i[3] ^ b_i[3];
    overflow    = carry_into3 ^ raw_sum[4];

    sum_o    = raw_sum[3:0];
    carry_o  = raw_sum[4];
    corr_sum = '0;

    if (overflow && !raw_sum[3]) begin
      case_o   = CASE_I;
      corr_sum = 5'(raw_sum[3:0]) + 5'b01010;
      sum_o    = corr_sum[3:0];
    end else if (overflow && raw_sum[3]) begin
      case_o   = CASE_II;
      corr_sum = 5'(raw_sum[3:0]) + 5'b00110;
      sum_o    = corr_sum[3:0];
      carry_o  = raw_sum[4] | corr_sum[4];
    end else if (!raw_sum[3]) begin
      case_o   = CASE_III;
    end else begin
      case_o   = CASE_IV;
      if (raw_sum[3:2] == 2'b10) begin
        corr_sum = 5'(raw_sum[3:0]) + 5'b01010;
        sum_o    = corr_sum[3:0];
      end
    end
  end

endmodule
