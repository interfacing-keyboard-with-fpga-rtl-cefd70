// binary_to_sg - seven-segment driver for the four-digit display.
//
// The four common-anode digits share one set of seven cathode lines, so only
// one digit can be lit at a time. A free-running refresh counter of
// REFRESH_BITS bits selects, with its two top bits, which digit is driven;
// each digit is lit for 2**(REFRESH_BITS-2) clock cycles in turn, fast
// enough for the eye to see all four at once. For the selected digit the
// driver pulls its anode enable low and puts that digit's segment pattern on
// the cathode lines; the other enables stay high. A blank digit keeps its
// enable high and all segments off.
//
// Segment patterns (segment lit = 0 on the active-low cathodes):
//   0-9 the usual decimal figures, DIG_ERR the letter E (a d e f g),
//   DIG_BLANK and any other code nothing.
// num[0] drives segment a, num[1] b, ... num[6] g. seg_en[i] is the
// active-low enable of the display at position i, position 0 being the
// rightmost digit.
//
// Interface: digits[i] is the digit code for position i; num and seg_en go
// to the board pins.
// Timing: outputs are registered, one cycle behind the refresh counter. At a
// 100 MHz clock the default REFRESH_BITS = 18 lights each digit for 655 us
// and refreshes the whole display at about 380 Hz.
//
// From the lab description: active-low segments and enables, time
// multiplexing, 'E' for non-digit keys. This design's choices: the refresh
// period, the segment-to-bit order of num, the position order of seg_en,
// switching a blank digit's enable off, and the synchronous reset.
module binary_to_sg
  import kb_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 18
) (
  input  logic       clk,
  input  logic       rst,
  input  digit_t     digits [NUM_DIGITS],
  output logic [6:0] num,
  output logic [3:0] seg_en
);

  logic [REFRESH_BITS-1:0] refresh_cnt;
  logic [1:0]              sel;
  logic [6:0]              pattern;

  assign sel = refresh_cnt[REFRESH_BITS-1 -: 2];

  // Active-low segment patterns, bit order g f e d c b a.
  always_comb begin
    unique case (digits[sel])
      4'd0:    pattern = 7'b100_0000;
      4'd1:    pattern = 7'b111_1001;
      4'd2:    pattern = 7'b010_0100;
      4'd3:    pattern = 7'b011_0000;
      4'd4:    pattern = 7'b001_1001;
      4'd5:    pattern = 7'b001_0010;
      4'd6:    pattern = 7'b000_0010;
      4'd7:    pattern = 7'b111_1000;
      4'd8:    pattern = 7'b000_0000;
      4'd9:    pattern = 7'b001_0000;
      DIG_ERR: pattern = 7'b000_0110;
      default: pattern = 7'b111_1111;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh_cnt <= '0;
      num         <= 7'b111_1111;
      seg_en      <= 4'b1111;
    end else begin
      refresh_cnt <= refresh_cnt + 1'b1;
      num         <= pattern;
      seg_en      <= 4'b1111;
      if (digits[sel] != DIG_BLANK) seg_en[sel] <= 1'b0;
    end
  end

  // The shared cathode bus may serve at most one digit at a time.
  a_one_digit: assert property (@(posedge clk) disable iff (rst) $onehot0(~seg_en));

endmodule
