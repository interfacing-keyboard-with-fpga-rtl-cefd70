// convert_to_binary - look-up table from a scan code to a display digit.
//
// The make codes of the main-row keys '0'..'9' (scan code set 2) map to the
// binary values 0..9. Every other code maps to DIG_ERR, which the
// seven-segment driver shows as the letter E. An empty display slot
// (code_valid low) maps to DIG_BLANK, a dark digit.
//
// Interface: scan_code/code_valid in, digit out. Purely combinational.
//
// The table of digit codes and the E-for-other-keys rule follow the lab
// description; the 4-bit encoding of E and blank is this design's choice
// (see kb_pkg).
module convert_to_binary
  import kb_pkg::*;
(
  input  scan_code_t scan_code,
  input  logic       code_valid,
  output digit_t     digit
);

  always_comb begin
    if (!code_valid) begin
      digit = DIG_BLANK;
    end else begin
      unique case (scan_code)
        SC_KEY0: digit = 4'd0;
        SC_KEY1: digit = 4'd1;
        SC_KEY2: digit = 4'd2;
        SC_KEY3: digit = 4'd3;
        SC_KEY4: digit = 4'd4;
        SC_KEY5: digit = 4'd5;
        SC_KEY6: digit = 4'd6;
        SC_KEY7: digit = 4'd7;
        SC_KEY8: digit = 4'd8;
        SC_KEY9: digit = 4'd9;
        default: digit = DIG_ERR;
      endcase
    end
  end

endmodule
