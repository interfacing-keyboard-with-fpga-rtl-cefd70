// keyboard_ctrl - decides which received scan codes are key presses and
// keeps the four codes to be displayed.
//
// A state machine follows the scan code set 2 byte sequences:
//   MAKE       waiting for a new sequence. F0 starts a break sequence, E0
//              an extended one, E1 the Pause key. Any other byte is the make
//              code of a key press and is shifted into the display buffer.
//   BREAK      after F0: the next byte names the released key and is dropped.
//   EXT        after E0: F0 starts an extended break; any other byte is the
//              make code of an extended key (cursor keys, Insert, Home ...),
//              which is shown as an error digit, so the buffer receives the
//              marker byte E0.
//   EXT_BREAK  after E0 F0: the next byte is dropped.
//   PAUSE      after E1: the Pause key is shown once (marker byte E1) and the
//              remaining PAUSE_SKIP bytes of its sequence are dropped.
// The display buffer holds NUM_DIGITS slots, slot 0 being the rightmost
// position. A key press moves every slot one position to the left (the
// leftmost code falls out) and puts the new code in slot 0, so digits appear
// at the right and travel left as more keys are pressed. A slot that has
// never been written since reset is marked empty and stays dark.
//
// Interface: valid_code/scan_code_in come from the serial receiver;
// disp_code[i]/disp_valid[i] give the code and the occupied flag of slot i.
// Timing: the buffer is updated in the cycle after valid_code.
//
// From the lab description: make, break (F0) and extended (E0) handling,
// the shift-in-from-the-right behaviour and the dark display after reset.
// This design's own choices: the marker bytes for extended and Pause keys,
// dropping the 7 trailing bytes of the Pause sequence (E1 14 77 E1 F0 14 F0
// 77 in scan code set 2), and the synchronous active-high reset.
module keyboard_ctrl
  import kb_pkg::*;
#(
  parameter int unsigned PAUSE_SKIP = 7
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_code,
  input  scan_code_t scan_code_in,
  output scan_code_t disp_code  [NUM_DIGITS],
  output logic       disp_valid [NUM_DIGITS]
);

  typedef enum logic [2:0] {
    S_MAKE,
    S_BREAK,
    S_EXT,
    S_EXT_BREAK,
    S_PAUSE
  } ctrl_state_t;

  localparam int unsigned SKIP_W = $clog2(PAUSE_SKIP + 2);

  ctrl_state_t state, state_next;
  logic        push;
  scan_code_t  push_code;
  logic [SKIP_W-1:0] skip_cnt, skip_cnt_next;

  always_comb begin
    state_next    = state;
    push          = 1'b0;
    push_code     = scan_code_in;
    skip_cnt_next = skip_cnt;
    if (valid_code) begin
      unique case (state)
        S_MAKE: begin
          if (scan_code_in == SC_BREAK) begin
            state_next = S_BREAK;
          end else if (scan_code_in == SC_EXTENDED) begin
            state_next = S_EXT;
          end else if (scan_code_in == SC_PAUSE) begin
            push          = 1'b1;
            push_code     = SC_PAUSE;
            skip_cnt_next = SKIP_W'(PAUSE_SKIP);
            state_next    = (PAUSE_SKIP == 0) ? S_MAKE : S_PAUSE;
          end else begin
            push = 1'b1;
          end
        end
        S_BREAK: state_next = S_MAKE;
        S_EXT: begin
          if (scan_code_in == SC_BREAK) begin
            state_next = S_EXT_BREAK;
          end else begin
            push       = 1'b1;
            push_code  = SC_EXTENDED;
            state_next = S_MAKE;
          end
        end
        S_EXT_BREAK: state_next = S_MAKE;
        S_PAUSE: begin
          skip_cnt_next = skip_cnt - 1'b1;
          if (skip_cnt == SKIP_W'(1)) state_next = S_MAKE;
        end
        default: state_next = S_MAKE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_MAKE;
      skip_cnt   <= '0;
      for (int i = 0; i < NUM_DIGITS; i++) begin
        disp_code[i]  <= '0;
        disp_valid[i] <= 1'b0;
      end
    end else begin
      state      <= state_next;
      skip_cnt   <= skip_cnt_next;
      if (push) begin
        for (int i = NUM_DIGITS - 1; i > 0; i--) begin
          disp_code[i]  <= disp_code[i-1];
          disp_valid[i] <= disp_valid[i-1];
        end
        disp_code[0]  <= push_code;
        disp_valid[0] <= 1'b1;
      end
    end
  end

endmodule
