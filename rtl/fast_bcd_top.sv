// fast_bcd_top: the fast BCD arithmetic unit, a multi-operand BCD adder and a
// BCD multiplier side by side. The multiplier is built from the same column
// adders and carry absorption as the adder, and adds its partial products
// with them.
//
// The two units are independent: each has its own start/busy/done
// handshake and its own operands and result, and both may run at the same
// time. See bcd_multi_operand_adder and bcd_multiplier for their timing.
// Digit index 0 is the least significant digit throughout.
//
// Defaults: the adder takes six three-digit operands, the multiplier two
// three-digit operands, the sizes of the method's two worked examples.
module fast_bcd_top
  import bcd_pkg::*;
#(
  parameter int unsigned ADD_OPS    = 6,
  parameter int unsigned ADD_DIGITS = 3,
  parameter int unsigned MUL_DIGITS = 3,
  localparam int unsigned APW  = $clog2(ADD_DIGITS + 2),
  localparam int unsigned MRPW = $clog2(MUL_DIGITS + 2),
  localparam int unsigned MFPW = $clog2(2 * MUL_DIGITS + 1)
) (
  input  logic       clk,
  input  logic       rst_n,

  // Multi-operand adder
  input  logic       add_start_i,
  input  bcd_digit_t add_ops_i    [ADD_OPS][ADD_DIGITS],
  output logic       add_busy_o,
  output logic       add_done_o,
  output bcd_digit_t add_sum_o    [ADD_DIGITS+1],
  output logic [APW-1:0] add_passes_o,
  output logic [7:0] add_case_cnt_o [4],

  // Multiplier
  input  logic       mul_start_i,
  input  bcd_digit_t mul_x_i      [MUL_DIGITS],
  input  bcd_digit_t mul_m_i      [MUL_DIGITS],
  output logic       mul_busy_o,
  output logic       mul_done_o,
  output bcd_digit_t mul_product_o [2*MUL_DIGITS],
  output logic [MRPW-1:0] mul_row_passes_o,
  output logic [MFPW-1:0] mul_final_passes_o
);

  bcd_multi_operand_adder #(
    .N_OPS   (ADD_OPS),
    .N_DIGITS(ADD_DIGITS)
  ) u_adder (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (add_start_i),
    .ops_i     (add_ops_i),
    .busy_o    (add_busy_o),
    .done_o    (add_done_o),
    .sum_o     (add_sum_o),
    .passes_o  (add_passes_o),
    .case_cnt_o(add_case_cnt_o)
  );

  bcd_multiplier #(.N(MUL_DIGITS)) u_multiplier (
    .clk           (clk),
    .rst_n         (rst_n),
    .start_i       (mul_start_i),
    .x_i           (mul_x_i),
    .m_i           (mul_m_i),
    .busy_o        (mul_busy_o),
    .done_o        (mul_done_o),
    .product_o     (mul_product_o),
    .row_passes_o  (mul_row_passes_o),
    .final_passes_o(mul_final_passes_o)
  );

endmodule
