// keyboard_top - PS/2 keyboard to four-digit seven-segment display.
//
// A keyboard sends a serial frame for every key press and release. This top
// level receives the frames, shows the binary pattern of the latest received
// byte on eight bargraph LEDs, and shows the digit keys '0'..'9' that were
// pressed on a four-digit seven-segment display: each new key appears at the
// right and the earlier ones move one place left. Any other key is shown as
// the letter E. After reset the display is dark.
//
// Chain of blocks, all clocked by sys_clk and reset by rst:
//   sync_keyboard     two-flip-flop synchronizer for kb_clk and kb_data
//   edge_detector     one-cycle pulse per falling edge of the keyboard clock
//   convert_scancode  shift register + mod-11 counter -> scan code, valid
//   keyboard_ctrl     make/break/extended state machine, 4-code buffer
//   convert_to_binary scan code -> digit code (one per display position)
//   binary_to_sg      time-multiplexed seven-segment driver
//
// Ports (names as on the board):
//   sys_clk  system clock; rst active-high reset (push button sw0)
//   kb_clk, kb_data  PS/2 clock and data from the keyboard port
//   sc[7:0]    active-high bargraph LD7..LD0, bits [7:0] of the receive
//              shift register
//   num[6:0]   active-low segment cathodes, num[0] = a ... num[6] = g
//   seg_en[3:0] active-low digit enables AN3..AN0, AN0 = rightmost digit
// Timing: a key press reaches the display buffer 4 sys_clk cycles after the
// last falling keyboard-clock edge of its frame (two synchronizer stages,
// the final shift, the buffer update). The driver's output register adds one
// cycle, and the digit lights when the refresh counter next selects its
// position.
//
// Block partition, port list, reset button and display behaviour follow the
// lab description; REFRESH_BITS and the encodings documented in the blocks
// are this design's choices.
module keyboard_top
  import kb_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 18
) (
  input  logic       sys_clk,
  input  logic       rst,
  input  logic       kb_clk,
  input  logic       kb_data,
  output logic [7:0] sc,
  output logic [6:0] num,
  output logic [3:0] seg_en
);

  logic       kb_clk_sync;
  logic       kb_data_sync;
  logic       edge_found;
  logic       valid_scan_code;
  scan_code_t scan_code;
  scan_code_t disp_code  [NUM_DIGITS];
  logic       disp_valid [NUM_DIGITS];
  digit_t     digits     [NUM_DIGITS];

  sync_keyboard u_sync (
    .clk          (sys_clk),
    .rst          (rst),
    .kb_clk       (kb_clk),
    .kb_data      (kb_data),
    .kb_clk_sync  (kb_clk_sync),
    .kb_data_sync (kb_data_sync)
  );

  edge_detector u_edge (
    .clk         (sys_clk),
    .rst         (rst),
    .kb_clk_sync (kb_clk_sync),
    .edge_found  (edge_found)
  );

  convert_scancode u_conv (
    .clk             (sys_clk),
    .rst             (rst),
    .edge_found      (edge_found),
    .serial_data     (kb_data_sync),
    .valid_scan_code (valid_scan_code),
    .scan_code_out   (scan_code)
  );

  keyboard_ctrl u_ctrl (
    .clk          (sys_clk),
    .rst          (rst),
    .valid_code   (valid_scan_code),
    .scan_code_in (scan_code),
    .disp_code    (disp_code),
    .disp_valid   (disp_valid)
  );

  for (genvar i = 0; i < NUM_DIGITS; i++) begin : g_bin
    convert_to_binary u_bin (
      .scan_code  (disp_code[i]),
      .code_valid (disp_valid[i]),
      .digit      (digits[i])
    );
  end

  binary_to_sg #(
    .REFRESH_BITS (REFRESH_BITS)
  ) u_sg (
    .clk    (sys_clk),
    .rst    (rst),
    .digits (digits),
    .num    (num),
    .seg_en (seg_en)
  );

  assign sc = scan_code;

endmodule
