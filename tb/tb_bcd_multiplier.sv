// tb_bcd_multiplier: three-digit operands (the default size). Checks the
// worked example 899 x 678 = 609522, 999 x 999, zero operands and random
// pairs against integer multiplication, with the latency
// (done 3 + row passes + final passes cycles after start) on every run.
module tb_bcd_multiplier;
  import bcd_pkg::*;

  localparam int N = 3;
  logic clk = 0, rst_n = 0, start = 0;
  bcd_digit_t x [N], m [N];
  logic busy, done;
  bcd_digit_t product [2*N];
  logic [$clog2(N+2)-1:0]   row_passes;
  logic [$clog2(2*N+1)-1:0] final_passes;
  int checks = 0, failures = 0, cycle = 0;

  bcd_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .x_i(x), .m_i(m),
    .busy_o(busy), .done_o(done), .product_o(product),
    .row_passes_o(row_passes), .final_passes_o(final_passes));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int xv, input int mv);
    longint got = 0;
    int t0;
    for (int i = 0, q = xv; i < N; i++, q /= 10) x[i] = 4'(q % 10);
    for (int i = 0, q = mv; i < N; i++, q /= 10) m[i] = 4'(q % 10);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t0 = cycle;
    while (!done) @(negedge clk);
    for (int i = 2 * N - 1; i >= 0; i--) got = got * 10 + longint'(product[i]);
    checks++;
    if (got != longint'(xv) * mv) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, got %0d", xv, mv, xv * mv, got);
    end
    checks++;
    if (cycle - t0 != 3 + int'(row_passes) + int'(final_passes)) begin
      failures++;
      $display("FAIL latency %0d (row passes %0d, final passes %0d)",
               cycle - t0, row_passes, final_passes);
    end
  endtask

  initial begin
    x = '{default: '0}; m = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(899, 678);
    run(999, 999);
    run(0, 0);
    run(123, 0);
    for (int t = 0; t < 1000; t++) run($urandom_range(999), $urandom_range(999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
