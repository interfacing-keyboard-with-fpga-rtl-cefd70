// kb_pkg - types and constants shared by the PS/2 keyboard-to-display design.
//
// PS/2 scan code set 2 is used throughout. A key press sends its 8-bit
// make code; a release sends the prefix F0 followed by the make code.
// Cursor and similar keys put E0 in front of both, and the Pause key starts
// its sequence with E1. The prefix values and the make codes of the ten
// digit keys on the main row are the ones of scan code set 2.
//
// digit_t is the 4-bit code that travels from the scan-code converter to the
// seven-segment driver: 0-9 for a digit, DIG_ERR for any other key (shown as
// the letter E) and DIG_BLANK for a display position that is switched off.
// The choice of 4'hE and 4'hF for these two is this design's own.
package kb_pkg;

  typedef logic [7:0] scan_code_t;
  typedef logic [3:0] digit_t;

  // Number of seven-segment positions on the board.
  localparam int unsigned NUM_DIGITS = 4;

  // Bits in one PS/2 frame: start, 8 data (LSB first), odd parity, stop.
  localparam int unsigned FRAME_BITS = 11;

  // Prefix bytes of scan code set 2.
  localparam scan_code_t SC_BREAK    = 8'hF0;
  localparam scan_code_t SC_EXTENDED = 8'hE0;
  localparam scan_code_t SC_PAUSE    = 8'hE1;

  // Make codes of the main-row digit keys '0'..'9'.
  localparam scan_code_t SC_KEY0 = 8'h45;
  localparam scan_code_t SC_KEY1 = 8'h16;
  localparam scan_code_t SC_KEY2 = 8'h1E;
  localparam scan_code_t SC_KEY3 = 8'h26;
  localparam scan_code_t SC_KEY4 = 8'h25;
  localparam scan_code_t SC_KEY5 = 8'h2E;
  localparam scan_code_t SC_KEY6 = 8'h36;
  localparam scan_code_t SC_KEY7 = 8'h3D;
  localparam scan_code_t SC_KEY8 = 8'h3E;
  localparam scan_code_t SC_KEY9 = 8'h46;

  // Digit codes beyond 0-9.
  localparam digit_t DIG_ERR   = 4'hE;
  localparam digit_t DIG_BLANK = 4'hF;

endpackage
