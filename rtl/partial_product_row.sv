// partial_product_row: forms one partial product X * m of the multiplier,
// where X has N digits and m is a single multiplier digit.
//
// Every digit x[i] is multiplied by m in parallel, giving a two-digit term
// r[i] s[i] (digit_multiplier). The tens digit r[i] of each term is then
// added to the units digit s[i+1] of the term to its left, in all positions
// at once, and this is repeated until every position holds a single digit.
// That repetition is the same parallel carry absorption the adder uses, so
// the r digits enter a carry_resolver as the carry vector and the s digits
// (recoded) as the sum vector; the extra top position starts at 0 and takes
// r[N-1].
//
// Interface: x_i (index 0 = least significant digit) and m_i must be steady
// from start_i until done_o. row_o (N+1 digits) is valid from done_o until
// the next start_i. Latency: 1 + passes_o cycles after start_i.
// The parallel products and the repeated r-into-s merge follow the method;
// the digit product circuit and the clocked schedule are this design's own.
module partial_product_row
  import bcd_pkg::*;
#(
  parameter int unsigned N = 3,
  localparam int unsigned PW = $clog2(N + 2)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  bcd_digit_t x_i   [N],
  input  bcd_digit_t m_i,
  output logic       busy_o,
  output logic       done_o,
  output bcd_digit_t row_o [N+1],
  output logic [PW-1:0] passes_o
);

  bcd_digit_t r      [N];
  bcd_digit_t s      [N];
  sd_code_t   sums   [N+1];
  bcd_digit_t carries[N+1];
  logic       unused_overflow;

  for (genvar i = 0; i < N; i++) begin : g_term
    digit_multiplier u_mul (.x_i(x_i[i]), .m_i(m_i), .r_o(r[i]), .s_o(s[i]));
    sd_encoder u_enc (.digit_i(s[i]), .code_o(sums[i]));
    assign carries[i] = r[i];
  end
  assign sums[N]    = '0;
  assign carries[N] = '0;

  carry_resolver #(.W(N + 1)) u_merge (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start_i),
    .sums_i    (sums),
    .carries_i (carries),
    .busy_o    (busy_o),
    .done_o    (done_o),
    .result_o  (row_o),
    .passes_o  (passes_o),
    .overflow_o(unused_overflow)
  );

endmodule
