// carry_resolver: turns W column results (sum code + carry count) into a
// W-digit BCD number by repeated parallel carry absorption.
//
// Column i holds a sum code S[i] and a carry count C[i] (0..9, worth ten
// units of column i, i.e. one unit of column i+1). One pass adds, in every
// column at once, the recoded carry of the column to its right to its own
// sum code with a corrected digit adder: S[i] += C[i-1]. The decimal carries
// these adds produce (0 or 1 each) become the new carry vector. Passes repeat
// until no column holds a carry; then each sum code is decoded to BCD.
// Nothing ripples through the columns within a pass: one pass is one digit
// adder delay, and the number of passes depends on the data (none when the
// columns made no carries, W-1 at most for a carry that runs through a row
// of nines).
//
// Timing: start_i (one cycle, while not busy) loads the operands. Each
// following cycle either does one pass or, when no carry is left, raises
// done_o for one cycle and drops busy_o. So done_o comes passes_o+1 cycles
// after start_i. result_o and passes_o hold until the next start_i.
// A carry out of the top column cannot be represented; overflow_o reports it
// and an assertion flags it. The caller sizes W so that it cannot happen.
//
// The pass structure follows the method's Steps 3 to 5; the start/done
// handshake, the one-pass-per-clock schedule and the recoding of a carry
// count through the digit recoder before it is added are this design's own.
module carry_resolver
  import bcd_pkg::*;
#(
  parameter int unsigned W = 4,
  localparam int unsigned PW = $clog2(W + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  sd_code_t   sums_i     [W],
  input  bcd_digit_t carries_i  [W],
  output logic       busy_o,
  output logic       done_o,
  output bcd_digit_t result_o   [W],
  output logic [PW-1:0] passes_o,
  output logic       overflow_o
);

  sd_code_t   sum_q   [W];
  bcd_digit_t carry_q [W];
  sd_code_t   sum_nx  [W];
  logic       cout_nx [W];
  logic       any_carry;

  // One pass: column i absorbs the carry of column i-1.
  assign sum_nx[0]  = sum_q[0];
  assign cout_nx[0] = 1'b0;
  for (genvar i = 1; i < W; i++) begin : g_col
    sd_code_t  addend;
    adj_case_e unused_case;
    sd_encoder u_enc (.digit_i(carry_q[i-1]), .code_o(addend));
    sd_digit_adder u_add (
      .a_i    (sum_q[i]),
      .b_i    (addend),
      .sum_o  (sum_nx[i]),
      .carry_o(cout_nx[i]),
      .case_o (unused_case)
    );
  end

  always_comb begin
    any_carry = 1'b0;
    for (int i = 0; i < W; i++) any_carry |= (carry_q[i] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o     <= 1'b0;
      done_o     <= 1'b0;
      passes_o   <= '0;
      overflow_o <= 1'b0;
      for (int i = 0; i < W; i++) begin
        sum_q[i]   <= '0;
        carry_q[i] <= '0;
      end
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        busy_o     <= 1'b1;
        passes_o   <= '0;
        overflow_o <= 1'b0;
        sum_q      <= sums_i;
        carry_q    <= carries_i;
      end else if (busy_o) begin
        if (any_carry) begin
          passes_o   <= passes_o + 1'b1;
          overflow_o <= overflow_o | (carry_q[W-1] != '0);
          sum_q      <= sum_nx;
          for (int i = 0; i < W; i++) carry_q[i] <= bcd_digit_t'(cout_nx[i]);
        end else begin
          busy_o <= 1'b0;
          done_o <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++) result_o[i] = sd_decode(sum_q[i]);
  end

  // The top column must never have to pass a carry on.
  assert property (@(posedge clk) disable iff (!rst_n)
                   busy_o |-> carry_q[W-1] == '0)
    else $error("carry_resolver: carry out of the top column lost");

  // start_i is only taken while idle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   start_i |-> !busy_o)
    else $error("carry_resolver: start while busy");

endmodule
