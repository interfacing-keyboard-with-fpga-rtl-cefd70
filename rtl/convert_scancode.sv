// convert_scancode - turns the PS/2 serial stream into 8-bit scan codes.
//
// A PS/2 frame is 11 bits sent LSB first: a start bit (0), eight data bits,
// an odd parity bit and a stop bit (1). On every cycle with edge_found high
// the bit on serial_data is shifted into the top of a 10-bit shift register
// that shifts right, so the first bit received ends up at the bottom. After
// 11 shifts the start bit has passed through the whole register and been
// dropped, bits [7:0] hold the scan code (bit 0 = first data bit), bit 8 the
// parity bit and bit 9 the stop bit. A bit counter that counts 0..10 and
// wraps (mod 11) marks the end of a frame; when it wraps, valid_scan_code is
// raised for one cycle.
//
// Interface: edge_found is the falling-edge pulse of the keyboard clock,
// serial_data the synchronized keyboard data; scan_code_out is bits [7:0]
// of the shift register, valid_scan_code the end-of-frame pulse.
// Timing: valid_scan_code is high in the cycle after the edge_found of the
// stop bit, the same cycle in which scan_code_out first shows the complete
// code. scan_code_out is the live register, so it changes while the next
// frame is shifted in.
//
// Register, shift direction and mod-11 counter follow the lab description.
// The parity and stop bits are stored in bits [9:8] but not checked, as in
// the description; reset clears register and counter (synchronous, active high) - this
// design's choice.
module convert_scancode
  import kb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       edge_found,
  input  logic       serial_data,
  output logic       valid_scan_code,
  output scan_code_t scan_code_out
);

  logic [FRAME_BITS-2:0] shift_reg;   // 10 bits: stop, parity, data[7:0]
  logic [3:0]            bit_cnt;     // 0 .. FRAME_BITS-1

  always_ff @(posedge clk) begin
    if (rst) begin
      shift_reg       <= '0;
      bit_cnt         <= '0;
      valid_scan_code <= 1'b0;
    end else begin
      valid_scan_code <= 1'b0;
      if (edge_found) begin
        shift_reg <= {serial_data, shift_reg[FRAME_BITS-2:1]};
        if (bit_cnt == 4'(FRAME_BITS - 1)) begin
          bit_cnt         <= '0;
          valid_scan_code <= 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 4'd1;
        end
      end
    end
  end

  assign scan_code_out = shift_reg[7:0];

  // A frame takes at least 11 edge_found pulses, so valid_scan_code is
  // always a single-cycle pulse.
  a_valid_pulse: assert property (@(posedge clk) disable iff (rst)
    valid_scan_code |=> !valid_scan_code);

endmodule
