// tb_convert_to_binary - exhaustive test of the scan-code look-up table.
//
// All 256 codes are applied with code_valid high and low. With code_valid
// low the output must be the blank code; with it high the ten main-row
// digit keys of scan code set 2 must give their value and every other code
// the error digit. The expected values come from a key table kept in the
// testbench as strings.
module tb_convert_to_binary;
  import kb_pkg::*;

  scan_code_t scan_code;
  logic       code_valid;
  digit_t     digit;
  int         checks = 0;
  int         failures = 0;

  convert_to_binary dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Make codes of keys '0' .. '9', in that order.
    static string table_hex = "45161E26252E363D3E46";
    static int errs = 0;
    for (int c = 0; c < 256; c++) begin
      digit_t expected;
      expected = 4'hE;
      for (int d = 0; d < 10; d++)
        if (table_hex.substr(2*d, 2*d+1).atohex() == c) expected = 4'(d);
      if (expected == 4'hE) errs++;
      scan_code  = 8'(c);
      code_valid = 1'b1;
      #1;
      checks++;
      if (digit !== expected) begin
        failures++;
        $display("code %h: digit %h expected %h", c, digit, expected);
      end
      code_valid = 1'b0;
      #1;
      checks++;
      if (digit !== 4'hF) begin
        failures++;
        $display("code %h invalid: digit %h expected blank", c, digit);
      end
    end
    checks++;
    if (errs != 246) begin
      failures++;
      $display("reference table broken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
