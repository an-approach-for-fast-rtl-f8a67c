// tb_digit_multiplier: all 100 digit pairs against integer multiplication.
module tb_digit_multiplier;
  import bcd_pkg::*;

  bcd_digit_t x, m, r, s;
  int checks = 0, failures = 0;

  digit_multiplier dut (.x_i(x), .m_i(m), .r_o(r), .s_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 10; j++) begin
        x = 4'(i); m = 4'(j);
        #1;
        checks++;
        if (int'(r) != (i * j) / 10 || int'(s) != (i * j) % 10) begin
          failures++;
          $display("FAIL %0d*%0d: r=%0d s=%0d", i, j, r, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
