// tb_partial_product_row: forms X*m for three-digit X. Checks the worked
// example rows 899*6 = 5394, 899*7 = 6293, 899*8 = 7192, every multiplier
// digit against random X, the latency (done 1 + passes cycles after start),
// and that some rows need more than one merge pass.
module tb_partial_product_row;
  import bcd_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0, start = 0;
  bcd_digit_t x [N];
  bcd_digit_t m;
  logic busy, done;
  bcd_digit_t row [N+1];
  logic [$clog2(N+2)-1:0] passes;
  int checks = 0, failures = 0, cycle = 0, multi_pass = 0;

  partial_product_row #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .x_i(x), .m_i(m),
    .busy_o(busy), .done_o(done), .row_o(row), .passes_o(passes));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int xv, input int mv);
    int got = 0, t0;
    for (int i = 0, v = xv; i < N; i++, v /= 10) x[i] = 4'(v % 10);
    m = 4'(mv);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle;
    while (!done) @(negedge clk);
    for (int i = N; i >= 0; i--) begin
      checks++;
      if (row[i] > 4'd9) begin failures++; $display("FAIL non-BCD digit"); end
      got = got * 10 + int'(row[i]);
    end
    checks++;
    if (got != xv * mv) begin
      failures++;
      $display("FAIL %0d*%0d = %0d, got %0d", xv, mv, xv * mv, got);
    end
    checks++;
    if (cycle - t0 != int'(passes) + 1) begin
      failures++;
      $display("FAIL latency %0d for %0d passes", cycle - t0, passes);
    end
    if (passes > 1) multi_pass++;
  endtask

  initial begin
    x = '{default: '0}; m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(899, 6); run(899, 7); run(899, 8);
    for (int t = 0; t < 500; t++) run($urandom_range(999), t % 10);
    run(999, 9);
    checks++;
    if (multi_pass == 0) begin failures++; $display("FAIL no multi-pass row"); end
    $display("rows needing more than one pass: %0d", multi_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
