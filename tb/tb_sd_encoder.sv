// tb_sd_encoder: checks the digit recoding against the full ten-entry table
// (0..5 unchanged, 6..9 -> 1100..1111).
module tb_sd_encoder;
  import bcd_pkg::*;

  bcd_digit_t digit;
  sd_code_t   code;
  int checks = 0, failures = 0;

  sd_encoder dut (.digit_i(digit), .code_o(code));

  // Expected codes written out as the table of the method.
  localparam logic [3:0] EXPECTED [10] = '{4'b0000, 4'b0001, 4'b0010, 4'b0011,
                                           4'b0100, 4'b0101, 4'b1100, 4'b1101,
                                           4'b1110, 4'b1111};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 10; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (code !== EXPECTED[d]) begin
        failures++;
        $display("FAIL digit %0d: code %b, expected %b", d, code, EXPECTED[d]);
      end
      // The code read as a signed number is the digit, or the digit minus 10.
      checks++;
      if (int'($signed(code)) != (d <= 5 ? d : d - 10)) begin
        failures++;
        $display("FAIL digit %0d: signed value %0d", d, $signed(code));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
