// tb_sd_digit_adder: checks the corrected digit adder on every pair of codes
// the datapath can hold (0000..0111 and 1100..1111), plus directed vectors.
// For each pair it checks the value (10*carry + value of the sum equals the
// sum of the input values), that the sum is again such a code, and that the
// reported case matches overflow and sign worked out with signed integers.
module tb_sd_digit_adder;
  import bcd_pkg::*;

  sd_code_t  a, b, sum;
  logic      carry;
  adj_case_e cs;
  int checks = 0, failures = 0;
  int seen [4];

  sd_digit_adder dut (.a_i(a), .b_i(b), .sum_o(sum), .carry_o(carry), .case_o(cs));

  function automatic int code_value(input logic [3:0] s);
    if (s <= 4'd7) return int'(s);
    return int'(s) - 6;
  endfunction

  function automatic bit code_ok(input logic [3:0] s);
    return s <= 4'd7 || s >= 4'd12;
  endfunction

  task automatic expect_vec(input logic [3:0] ta, input logic [3:0] tb_,
                            input logic [3:0] esum, input logic ecarry,
                            input adj_case_e ecase);
    a = ta; b = tb_;
    #1;
    checks++;
    if (sum !== esum || carry !== ecarry || cs !== ecase) begin
      failures++;
      $display("FAIL %b+%b: got %b c%0d %s, expected %b c%0d %s", ta, tb_,
               sum, carry, cs.name(), esum, ecarry, ecase.name());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int sa, sb, ssum;
        bit ov;
        adj_case_e ecase;
        if (!code_ok(4'(i)) || !code_ok(4'(j))) continue;
        a = 4'(i); b = 4'(j);
        #1;
        sa = int'($signed(a)); sb = int'($signed(b)); ssum = sa + sb;
        ov = ssum > 7 || ssum < -8;
        if (ov) ecase = (ssum > 7) ? CASE_II : CASE_I;   // wrapped sign
        else    ecase = (ssum >= 0) ? CASE_III : CASE_IV;
        seen[int'(cs)]++;
        checks++;
        if (10 * int'(carry) + code_value(sum) != code_value(a) + code_value(b)) begin
          failures++;
          $display("FAIL %b+%b: carry %0d sum %b", a, b, carry, sum);
        end
        checks++;
        if (!code_ok(sum)) begin
          failures++;
          $display("FAIL %b+%b: sum %b is not a code", a, b, sum);
        end
        checks++;
        if (cs !== ecase) begin
          failures++;
          $display("FAIL %b+%b: case %s, expected %s", a, b, cs.name(), ecase.name());
        end
      end
    end
    // Worked steps of the method: 7 + 8, then + 5, then + 3.
    expect_vec(4'b1101, 4'b1110, 4'b0101, 1'b1, CASE_IV);   // 15
    expect_vec(4'b0101, 4'b0101, 4'b0000, 1'b1, CASE_II);   // 5 + 5 = 10
    expect_vec(4'b1101, 4'b0011, 4'b0000, 1'b1, CASE_III);  // 7 + 3 = 10
    expect_vec(4'b1100, 4'b0011, 4'b1111, 1'b0, CASE_IV);   // 6 + 3 = 9, kept
    // Case i, only reachable from patterns outside the code set.
    expect_vec(4'b1000, 4'b1000, 4'b1010, 1'b1, CASE_I);
    checks++;
    if (seen[CASE_II] == 0 || seen[CASE_III] == 0 || seen[CASE_IV] == 0) begin
      failures++;
      $display("FAIL a case was never taken");
    end
    $display("cases seen: ii=%0d iii=%0d iv=%0d", seen[CASE_II], seen[CASE_III], seen[CASE_IV]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
