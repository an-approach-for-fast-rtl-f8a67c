// column_accumulator: sums one decimal column of N_OPS BCD digits.
//
// Each digit is first recoded into a column code (sd_encoder). The first two
// codes are added with a corrected digit adder, then each further code is
// added to the running partial sum, one after the other, exactly as the
// method's Step 2 describes. Every decimal carry produced on the way is
// counted, so the column result is a pair (carry count, sum code) worth
// 10*carry_cnt_o + decode(sum_o).
//
// The chain is combinational: N_OPS-1 digit adders in series and a small
// counter. All columns of a multi-digit addition use their own accumulator
// and work at the same time. The carry count is kept to one BCD digit, which
// holds for N_OPS <= 11 (11 nines give a carry of 9); the design asks for
// N_OPS <= 11. case_cnt_o reports how many adds took each correction case.
//
// Default N_OPS = 6 is the size of the method's six-operand worked example.
module column_accumulator
  import bcd_pkg::*;
#(
  parameter int unsigned N_OPS = 6
) (
  input  bcd_digit_t digits_i [N_OPS],
  output sd_code_t   sum_o,
  output bcd_digit_t carry_cnt_o,
  output logic [3:0] case_cnt_o [4]   // indexed by adj_case_e
);

  sd_code_t  codes   [N_OPS];
  sd_code_t  partial [N_OPS];         // partial[k]: sum of codes 0..k
  logic      carry   [N_OPS];         // carry[k]: decimal carry of add k
  adj_case_e cases   [N_OPS];

  for (genvar k = 0; k < N_OPS; k++) begin : g_enc
    sd_encoder u_enc (.digit_i(digits_i[k]), .code_o(codes[k]));
  end

  assign partial[0] = codes[0];
  assign carry[0]   = 1'b0;
  assign cases[0]   = CASE_III;

  for (genvar k = 1; k < N_OPS; k++) begin : g_add
    sd_digit_adder u_add (
      .a_i    (partial[k-1]),
      .b_i    (codes[k]),
      .sum_o  (partial[k]),
      .carry_o(carry[k]),
      .case_o (cases[k])
    );
  end

  always_comb begin
    carry_cnt_o = '0;
    for (int c = 0; c < 4; c++) case_cnt_o[c] = '0;
    for (int k = 1; k < N_OPS; k++) begin
      carry_cnt_o = carry_cnt_o + 4'(carry[k]);
      case_cnt_o[int'(cases[k])] = case_cnt_o[int'(cases[k])] + 4'd1;
    end
  end

  assign sum_o = partial[N_OPS-1];

  if (N_OPS < 2 || N_OPS > 11) begin : g_bad_size
    $error("column_accumulator: N_OPS must be 2..11");
  end

endmodule
