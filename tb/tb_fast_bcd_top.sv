// tb_fast_bcd_top: end-to-end test of the whole unit at its default sizes
// (six three-digit addends, three-digit by three-digit multiply).
//
// The adder and the multiplier are driven at the same time from two threads.
// The method's worked examples are run first (929+838+619+788+159+278 = 3611,
// the single columns 6+3+4+7 = 20 and 7+8+5+7+3 = 30, and 899 x 678 = 609522),
// then random operands. Every result is checked against
// integer arithmetic and every latency against the pass counts.
//
// Mechanisms counted, each of which must happen at least once:
//   correction cases ii, iii and iv inside the adder's columns; adder runs
//   with 0, 1, 2 and 3 absorption passes (3 = a carry through every column);
//   a multiplier row needing two or more merge passes; a final multiplier
//   absorption with two or more passes; both units busy in the same cycle.
// Case i is reported but not required: no sum of two codes this datapath
// holds can produce it (its inputs would need a 10xx pattern).
module tb_fast_bcd_top;
  import bcd_pkg::*;

  localparam int N_OPS = 6, D = 3, MD = 3;
  logic clk = 0, rst_n = 0;
  logic add_start = 0, mul_start = 0;
  bcd_digit_t add_ops [N_OPS][D];
  logic add_busy, add_done, mul_busy, mul_done;
  bcd_digit_t add_sum [D+1];
  logic [$clog2(D+2)-1:0] add_passes;
  logic [7:0] add_case_cnt [4];
  bcd_digit_t mul_x [MD], mul_m [MD];
  bcd_digit_t mul_product [2*MD];
  logic [$clog2(MD+2)-1:0]   mul_row_passes;
  logic [$clog2(2*MD+1)-1:0] mul_final_passes;

  int checks = 0, failures = 0, cycle = 0;
  int case_seen [4];
  int add_pass_seen [D+2];
  int row_multi = 0, final_multi = 0, both_busy = 0;

  fast_bcd_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_start_i(add_start), .add_ops_i(add_ops), .add_busy_o(add_busy),
    .add_done_o(add_done), .add_sum_o(add_sum), .add_passes_o(add_passes),
    .add_case_cnt_o(add_case_cnt),
    .mul_start_i(mul_start), .mul_x_i(mul_x), .mul_m_i(mul_m),
    .mul_busy_o(mul_busy), .mul_done_o(mul_done), .mul_product_o(mul_product),
    .mul_row_passes_o(mul_row_passes), .mul_final_passes_o(mul_final_passes));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (add_busy && mul_busy) both_busy++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic add_run(input int v [N_OPS]);
    int total = 0, got = 0, t0;
    for (int k = 0; k < N_OPS; k++) begin
      total += v[k];
      for (int i = 0, q = v[k]; i < D; i++, q /= 10) add_ops[k][i] = 4'(q % 10);
    end
    #1;
    for (int c = 0; c < 4; c++) case_seen[c] += int'(add_case_cnt[c]);
    @(negedge clk); add_start = 1;
    @(negedge clk); add_start = 0; t0 = cycle;
    while (!add_done) @(negedge clk);
    for (int i = D; i >= 0; i--) got = got * 10 + int'(add_sum[i]);
    checks++;
    if (got != total) fail($sformatf("adder: %0d expected, %0d got", total, got));
    checks++;
    if (cycle - t0 != int'(add_passes) + 1) fail("adder latency");
    add_pass_seen[add_passes]++;
  endtask

  task automatic mul_run(input int xv, input int mv);
    longint got = 0;
    int t0;
    for (int i = 0, q = xv; i < MD; i++, q /= 10) mul_x[i] = 4'(q % 10);
    for (int i = 0, q = mv; i < MD; i++, q /= 10) mul_m[i] = 4'(q % 10);
    @(negedge clk); mul_start = 1;
    @(negedge clk); mul_start = 0; t0 = cycle;
    while (!mul_done) @(negedge clk);
    for (int i = 2 * MD - 1; i >= 0; i--) got = got * 10 + longint'(mul_product[i]);
    checks++;
    if (got != longint'(xv) * mv) fail($sformatf("multiplier: %0d x %0d gave %0d", xv, mv, got));
    checks++;
    if (cycle - t0 != 3 + int'(mul_row_passes) + int'(mul_final_passes)) fail("multiplier latency");
    if (mul_row_passes >= 2) row_multi++;
    if (mul_final_passes >= 2) final_multi++;
  endtask

  initial begin
    add_ops = '{default: '{default: '0}};
    mul_x = '{default: '0}; mul_m = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin : adder_thread
        int v [N_OPS];
        v = '{929, 838, 619, 788, 159, 278}; add_run(v);
        checks++;
        if (add_sum[3] != 4'd3 || add_sum[2] != 4'd6 || add_sum[1] != 4'd1 || add_sum[0] != 4'd1)
          fail("worked addition example");
        // Single-column examples of the method: 6+3+4+7 = 20, 7+8+5+7+3 = 30.
        v = '{6, 3, 4, 7, 0, 0};       add_run(v);
        checks++;
        if (add_sum[1] != 4'd2 || add_sum[0] != 4'd0) fail("example 6+3+4+7");
        v = '{7, 8, 5, 7, 3, 0};       add_run(v);
        checks++;
        if (add_sum[1] != 4'd3 || add_sum[0] != 4'd0) fail("example 7+8+5+7+3");
        v = '{0, 0, 0, 0, 0, 0};       add_run(v);
        v = '{990, 5, 5, 0, 0, 0};     add_run(v);
        for (int t = 0; t < 2000; t++) begin
          for (int k = 0; k < N_OPS; k++) v[k] = $urandom_range(999);
          add_run(v);
        end
      end
      begin : multiplier_thread
        mul_run(899, 678);
        checks++;
        if (mul_product[5] != 4'd6 || mul_product[4] != 4'd0 || mul_product[3] != 4'd9 ||
            mul_product[2] != 4'd5 || mul_product[1] != 4'd2 || mul_product[0] != 4'd2)
          fail("worked multiplication example");
        mul_run(999, 999);
        for (int t = 0; t < 1000; t++) mul_run($urandom_range(999), $urandom_range(999));
      end
    join

    $display("correction cases: i=%0d ii=%0d iii=%0d iv=%0d",
             case_seen[0], case_seen[1], case_seen[2], case_seen[3]);
    $display("adder pass counts: 0:%0d 1:%0d 2:%0d 3:%0d",
             add_pass_seen[0], add_pass_seen[1], add_pass_seen[2], add_pass_seen[3]);
    $display("multiplier rows with >=2 passes: %0d, final absorptions with >=2 passes: %0d",
             row_multi, final_multi);
    $display("cycles with both units busy: %0d", both_busy);
    checks++; if (case_seen[CASE_II] == 0)  fail("case ii never taken");
    checks++; if (case_seen[CASE_III] == 0) fail("case iii never taken");
    checks++; if (case_seen[CASE_IV] == 0)  fail("case iv never taken");
    for (int p = 0; p <= D; p++) begin
      checks++;
      if (add_pass_seen[p] == 0) fail($sformatf("no adder run with %0d passes", p));
    end
    checks++; if (row_multi == 0)   fail("no multi-pass multiplier row");
    checks++; if (final_multi == 0) fail("no multi-pass final absorption");
    checks++; if (both_busy == 0)   fail("units never ran together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
