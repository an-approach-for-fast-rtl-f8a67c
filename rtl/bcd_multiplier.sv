// bcd_multiplier: multiplies two N-digit BCD numbers X and M, giving a
// 2N-digit BCD product.
//
// How it works, in three phases:
//  1. Partial products. X is multiplied by every digit m[j] of M at the same
//     time (partial_product_row, one per multiplier digit). Each row first
//     forms the two-digit terms x[i]*m[j] and then merges the tens digits
//     into the neighbouring units digits by parallel passes until every
//     position holds one digit. Rows finish after different numbers of
//     passes; the multiplier waits for the slowest.
//  2. Column sums. Row j is shifted left by j digits. Each of the 2N product
//     columns sums the (at most N) row digits that fall into it with a
//     column_accumulator, giving a sum code and a count of tens.
//  3. Carry absorption. The columns' tens counts are absorbed by a
//     carry_resolver, pass after pass, until no carry is left.
//
// Interface: x_i, m_i (index 0 = least significant digit) must be steady
// from start_i until done_o. product_o is valid from done_o until the next
// start_i. Latency: 1 cycle to start, (1 + the largest row pass count)
// cycles for the rows, then (1 + final_passes_o) cycles, so
// 3 + row_passes_o + final_passes_o cycles from start_i to done_o.
//
// The phases follow the method; the controller, its handshake and the
// digit product circuit are this design's own. Default N = 3 is the size of
// the method's worked example (899 x 678). N must be 2..11.
module bcd_multiplier
  import bcd_pkg::*;
#(
  parameter int unsigned N = 3,
  localparam int unsigned RPW = $clog2(N + 2),
  localparam int unsigned FPW = $clog2(2 * N + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  bcd_digit_t x_i       [N],
  input  bcd_digit_t m_i       [N],
  output logic       busy_o,
  output logic       done_o,
  output bcd_digit_t product_o [2*N],
  output logic [RPW-1:0] row_passes_o,   // largest pass count of the rows
  output logic [FPW-1:0] final_passes_o
);

  typedef enum logic [1:0] {S_IDLE, S_ROWS, S_FINAL} state_e;
  state_e state_q;

  // Phase 1: rows.
  bcd_digit_t      rows      [N][N+1];
  logic [N-1:0]    row_busy;
  logic [RPW-1:0]  row_passes[N];
  logic            rows_start;

  assign rows_start = start_i && state_q == S_IDLE;

  for (genvar j = 0; j < N; j++) begin : g_row
    partial_product_row #(.N(N)) u_row (
      .clk     (clk),
      .rst_n   (rst_n),
      .start_i (rows_start),
      .x_i     (x_i),
      .m_i     (m_i[j]),
      .busy_o  (row_busy[j]),
      .done_o  (),
      .row_o   (rows[j]),
      .passes_o(row_passes[j])
    );
  end

  always_comb begin
    row_passes_o = '0;
    for (int j = 0; j < N; j++)
      if (row_passes[j] > row_passes_o) row_passes_o = row_passes[j];
  end

  // Phase 2: shifted rows summed column by column.
  sd_code_t   col_sum   [2*N];
  bcd_digit_t col_carry [2*N];

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    bcd_digit_t column [N];
    logic [3:0] unused_cases [4];
    for (genvar j = 0; j < N; j++) begin : g_pick
      if (c - j >= 0 && c - j <= N) begin : g_in
        assign column[j] = rows[j][c-j];
      end else begin : g_out
        assign column[j] = '0;
      end
    end
    column_accumulator #(.N_OPS(N)) u_col (
      .digits_i   (column),
      .sum_o      (col_sum[c]),
      .carry_cnt_o(col_carry[c]),
      .case_cnt_o (unused_cases)
    );
  end

  // Phase 3: carry absorption.
  logic final_start;
  logic final_busy;
  logic unused_overflow;

  assign final_start = state_q == S_ROWS && row_busy == '0;

  carry_resolver #(.W(2 * N)) u_resolve (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (final_start),
    .sums_i    (col_sum),
    .carries_i (col_carry),
    .busy_o    (final_busy),
    .done_o    (done_o),
    .result_o  (product_o),
    .passes_o  (final_passes_o),
    .overflow_o(unused_overflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE:  if (rows_start)  state_q <= S_ROWS;
        S_ROWS:  if (final_start) state_q <= S_FINAL;
        S_FINAL: if (done_o)      state_q <= S_IDLE;
        default:                  state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = state_q != S_IDLE;

  // The final carry absorption only runs in the last phase.
  assert property (@(posedge clk) disable iff (!rst_n)
                   final_busy |-> state_q == S_FINAL)
    else $error("bcd_multiplier: carry absorption busy outside its phase");

  if (N < 2 || N > 11) begin : g_bad_size
    $error("bcd_multiplier: N must be 2..11");
  end

endmodule
