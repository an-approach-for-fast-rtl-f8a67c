// tb_column_accumulator: sums single columns of six digits. Checks the three
// columns of the worked six-operand example (hundreds 9,8,6,7,1,2 -> carry 3,
// sum 0011; tens 2,3,1,8,5,7 -> carry 2, sum 1100; units 9,8,9,8,9,8 ->
// carry 5, sum 0001), the five-digit example 7,8,5,7,3 (with a 0 added) ->
// carry 3, sum 0000, and random columns against integer addition.
module tb_column_accumulator;
  import bcd_pkg::*;

  localparam int N = 6;
  bcd_digit_t digits [N];
  sd_code_t   sum;
  bcd_digit_t carry_cnt;
  logic [3:0] case_cnt [4];
  int checks = 0, failures = 0;

  column_accumulator #(.N_OPS(N)) dut (
    .digits_i(digits), .sum_o(sum), .carry_cnt_o(carry_cnt), .case_cnt_o(case_cnt));

  function automatic int code_value(input logic [3:0] s);
    return (s <= 4'd7) ? int'(s) : int'(s) - 6;
  endfunction

  task automatic apply(input int d0, d1, d2, d3, d4, d5);
    digits[0] = 4'(d0); digits[1] = 4'(d1); digits[2] = 4'(d2);
    digits[3] = 4'(d3); digits[4] = 4'(d4); digits[5] = 4'(d5);
    #1;
  endtask

  task automatic expect_exact(input logic [3:0] ecarry, input logic [3:0] esum);
    checks++;
    if (carry_cnt !== ecarry || sum !== esum) begin
      failures++;
      $display("FAIL column: carry %0d sum %b, expected %0d %b", carry_cnt, sum, ecarry, esum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(9, 8, 6, 7, 1, 2); expect_exact(4'd3, 4'b0011);
    apply(2, 3, 1, 8, 5, 7); expect_exact(4'd2, 4'b1100);
    apply(9, 8, 9, 8, 9, 8); expect_exact(4'd5, 4'b0001);
    apply(7, 8, 5, 7, 3, 0); expect_exact(4'd3, 4'b0000);
    apply(6, 3, 4, 7, 0, 0); expect_exact(4'd2, 4'b0000);
    for (int t = 0; t < 3000; t++) begin
      automatic int total = 0;
      automatic int ncase = 0;
      for (int k = 0; k < N; k++) begin
        digits[k] = 4'($urandom_range(9));
        total += int'(digits[k]);
      end
      #1;
      checks++;
      if (10 * int'(carry_cnt) + code_value(sum) != total ||
          !(sum <= 4'd7 || sum >= 4'd12)) begin
        failures++;
        $display("FAIL random column total %0d: carry %0d sum %b", total, carry_cnt, sum);
      end
      for (int c = 0; c < 4; c++) ncase += int'(case_cnt[c]);
      checks++;
      if (ncase != N - 1) begin
        failures++;
        $display("FAIL case counts add up to %0d", ncase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
