// tb_carry_resolver: loads column results (sum codes and carry counts) and
// checks the absorbed BCD number against integer arithmetic, the cycle count
// (done one cycle after the last pass), and the pass count for cases whose
// count is known: no carries (0 passes), the worked example's columns
// (tens of 3,3 / 6,2 / 1,5 -> 3611, 2 passes) and a carry running through a
// row of nines (W-1 passes).
module tb_carry_resolver;
  import bcd_pkg::*;

  localparam int W = 4;
  logic clk = 0, rst_n = 0, start = 0;
  sd_code_t   sums    [W];
  bcd_digit_t carries [W];
  logic       busy, done, overflow;
  bcd_digit_t result  [W];
  logic [$clog2(W+1)-1:0] passes;
  int checks = 0, failures = 0;
  int cycle = 0;

  carry_resolver #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .sums_i(sums), .carries_i(carries),
    .busy_o(busy), .done_o(done), .result_o(result), .passes_o(passes),
    .overflow_o(overflow));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_code_t enc(input int d);
    return (d > 5) ? 4'(d + 6) : 4'(d);
  endfunction

  // Runs one absorption; expect_passes < 0 means "do not check the count".
  task automatic run(input int expect_passes);
    int total = 0, got = 0, weight = 1, t0;
    for (int i = 0; i < W; i++) begin
      int v = (sums[i] <= 4'd7) ? int'(sums[i]) : int'(sums[i]) - 6;
      total += (v + 10 * int'(carries[i])) * weight;
      weight *= 10;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle;
    while (!done) @(negedge clk);
    weight = 1;
    for (int i = 0; i < W; i++) begin
      checks++;
      if (result[i] > 4'd9) begin
        failures++;
        $display("FAIL digit %0d = %0d not BCD", i, result[i]);
      end
      got += int'(result[i]) * weight;
      weight *= 10;
    end
    checks++;
    if (got != total) begin
      failures++;
      $display("FAIL total %0d, got %0d", total, got);
    end
    checks++;
    if (cycle - t0 != int'(passes) + 1) begin
      failures++;
      $display("FAIL latency %0d cycles for %0d passes", cycle - t0, passes);
    end
    if (expect_passes >= 0) begin
      checks++;
      if (int'(passes) != expect_passes) begin
        failures++;
        $display("FAIL passes %0d, expected %0d", passes, expect_passes);
      end
    end
    checks++;
    if (overflow) begin
      failures++;
      $display("FAIL overflow");
    end
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin sums[i] = '0; carries[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // No carries: done after one cycle, value unchanged.
    sums[0] = enc(4); sums[1] = enc(7); sums[2] = enc(9); sums[3] = enc(1);
    run(0);
    // Worked example: units 1 carry 5, tens 6 carry 2, hundreds 3 carry 3.
    sums[0] = 4'b0001; carries[0] = 4'd5;
    sums[1] = 4'b1100; carries[1] = 4'd2;
    sums[2] = 4'b0011; carries[2] = 4'd3;
    sums[3] = 4'b0000; carries[3] = 4'd0;
    run(2);
    checks++;
    if (result[3] != 4'd3 || result[2] != 4'd6 || result[1] != 4'd1 || result[0] != 4'd1) begin
      failures++;
      $display("FAIL worked example: %0d%0d%0d%0d", result[3], result[2], result[1], result[0]);
    end
    // A carry running through 9s: 0990 + carry 1 out of column 0.
    sums[0] = enc(0); carries[0] = 4'd1;
    sums[1] = enc(9); carries[1] = 4'd0;
    sums[2] = enc(9); carries[2] = 4'd0;
    sums[3] = enc(0); carries[3] = 4'd0;
    run(W - 1);
    // Random column results whose total fits W digits.
    for (int t = 0; t < 400; t++) begin
      automatic int total;
      do begin
        total = 0;
        for (int i = W - 1; i >= 0; i--) begin
          sums[i]    = enc($urandom_range(9));
          carries[i] = (i == W - 1) ? 4'd0 : 4'($urandom_range(9));
          total = total * 10 + ((sums[i] <= 4'd7) ? int'(sums[i]) : int'(sums[i]) - 6);
        end
        for (int i = W - 2; i >= 0; i--) total += int'(carries[i]) * (10 ** (i + 1));
      end while (total >= 10 ** W);
      run(-1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
