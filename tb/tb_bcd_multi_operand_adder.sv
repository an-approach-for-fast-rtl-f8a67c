// tb_bcd_multi_operand_adder: six three-digit operands (the default size).
// Checks the worked example 929+838+619+788+159+278 = 3611, all-nines,
// all-zeros, a sum whose carry ripples through every column (passes = 3),
// and random operand sets against integer addition, with the latency
// (done 1 + passes cycles after start) on every run.
module tb_bcd_multi_operand_adder;
  import bcd_pkg::*;

  localparam int N_OPS = 6, D = 3;
  logic clk = 0, rst_n = 0, start = 0;
  bcd_digit_t ops [N_OPS][D];
  logic busy, done;
  bcd_digit_t sum [D+1];
  logic [$clog2(D+2)-1:0] passes;
  logic [7:0] case_cnt [4];
  int checks = 0, failures = 0, cycle = 0;
  int pass_hist [D+2];

  bcd_multi_operand_adder dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .ops_i(ops),
    .busy_o(busy), .done_o(done), .sum_o(sum), .passes_o(passes),
    .case_cnt_o(case_cnt));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int v [N_OPS], input int expect_passes);
    int total = 0, got = 0, t0;
    for (int k = 0; k < N_OPS; k++) begin
      total += v[k];
      for (int i = 0, q = v[k]; i < D; i++, q /= 10) ops[k][i] = 4'(q % 10);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle;
    while (!done) @(negedge clk);
    for (int i = D; i >= 0; i--) got = got * 10 + int'(sum[i]);
    checks++;
    if (got != total) begin
      failures++;
      $display("FAIL sum %0d, got %0d", total, got);
    end
    checks++;
    if (cycle - t0 != int'(passes) + 1) begin
      failures++;
      $display("FAIL latency %0d for %0d passes", cycle - t0, passes);
    end
    if (expect_passes >= 0) begin
      checks++;
      if (int'(passes) != expect_passes) begin
        failures++;
        $display("FAIL passes %0d, expected %0d", passes, expect_passes);
      end
    end
    pass_hist[passes]++;
  endtask

  initial begin
    int v [N_OPS];
    ops = '{default: '{default: '0}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    v = '{929, 838, 619, 788, 159, 278}; run(v, 2);
    v = '{999, 999, 999, 999, 999, 999}; run(v, -1);
    v = '{0, 0, 0, 0, 0, 0};             run(v, 0);
    v = '{123, 201, 310, 4, 50, 100};    run(v, 0);
    v = '{990, 5, 5, 0, 0, 0};           run(v, 3);
    for (int t = 0; t < 1000; t++) begin
      for (int k = 0; k < N_OPS; k++) v[k] = $urandom_range(999);
      run(v, -1);
    end
    for (int p = 0; p <= D; p++) $display("runs with %0d passes: %0d", p, pass_hist[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
