// bcd_multi_operand_adder: adds N_OPS unsigned BCD numbers of N_DIGITS digits
// each, giving an (N_DIGITS+1)-digit BCD sum.
//
// Main idea: instead of adding the numbers one after another with a carry
// rippling through all digits each time, every decimal column is summed on
// its own, all columns at once (column_accumulator). Inside a column the
// digits are recoded so that 6..9 become small negative numbers, and each
// 4-bit partial sum is corrected from its overflow and sign bits; the column
// delivers a sum digit and a count of tens. Only then are the tens counts
// absorbed into the columns to their left, in parallel passes that repeat
// until no carry is left (carry_resolver). Carries therefore cross column
// boundaries only at the very end, usually in one or two passes.
//
// Interface: ops_i[k][i] is digit i (0 = least significant) of operand k.
// The operands must be steady from start_i until done_o. sum_o is valid from
// done_o until the next start_i; done_o comes passes_o+1 cycles after
// start_i. case_cnt_o counts, for the operands now applied, how many digit
// additions inside the columns took each correction case (for observation).
//
// Defaults: six operands of three digits, the size of the method's worked
// example. N_OPS is limited to 2..10 so that the sum fits N_DIGITS+1 digits.
module bcd_multi_operand_adder
  import bcd_pkg::*;
#(
  parameter int unsigned N_OPS    = 6,
  parameter int unsigned N_DIGITS = 3,
  localparam int unsigned PW = $clog2(N_DIGITS + 2)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  bcd_digit_t ops_i      [N_OPS][N_DIGITS],
  output logic       busy_o,
  output logic       done_o,
  output bcd_digit_t sum_o      [N_DIGITS+1],
  output logic [PW-1:0] passes_o,
  output logic [7:0] case_cnt_o [4]
);

  sd_code_t   col_sum   [N_DIGITS+1];
  bcd_digit_t col_carry [N_DIGITS+1];
  logic [3:0] col_cases [N_DIGITS][4];
  logic       unused_overflow;

  for (genvar i = 0; i < N_DIGITS; i++) begin : g_col
    bcd_digit_t column [N_OPS];
    for (genvar k = 0; k < N_OPS; k++) begin : g_pick
      assign column[k] = ops_i[k][i];
    end
    column_accumulator #(.N_OPS(N_OPS)) u_col (
      .digits_i   (column),
      .sum_o      (col_sum[i]),
      .carry_cnt_o(col_carry[i]),
      .case_cnt_o (col_cases[i])
    );
  end
  // The extra top column starts empty and only receives carries.
  assign col_sum[N_DIGITS]   = '0;
  assign col_carry[N_DIGITS] = '0;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      case_cnt_o[c] = '0;
      for (int i = 0; i < N_DIGITS; i++)
        case_cnt_o[c] = case_cnt_o[c] + 8'(col_cases[i][c]);
    end
  end

  carry_resolver #(.W(N_DIGITS + 1)) u_resolve (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start_i),
    .sums_i    (col_sum),
    .carries_i (col_carry),
    .busy_o    (busy_o),
    .done_o    (done_o),
    .result_o  (sum_o),
    .passes_o  (passes_o),
    .overflow_o(unused_overflow)
  );

  if (N_OPS < 2 || N_OPS > 10) begin : g_bad_size
    $error("bcd_multi_operand_adder: N_OPS must be 2..10");
  end

endmodule
