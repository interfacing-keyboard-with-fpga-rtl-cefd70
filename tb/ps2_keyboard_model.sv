// ps2_keyboard_model - behavioural model of the keyboard side of a PS/2 port
// (simulation only, not synthesizable).
//
// It stands in for the board's USB-to-PS/2 host, which presents a USB
// keyboard as a PS/2 device. send_byte() transmits one 11-bit frame: start
// bit 0, eight data bits LSB first, odd parity, stop bit 1. The data line is
// changed a short skew after the rising clock edge and is stable on each
// falling edge, where the receiver samples it. Both lines idle high.
// half_period is half the keyboard clock period in simulation time units;
// skew is the delay from the rising clock edge to the data change.
module ps2_keyboard_model (
  output logic kb_clk,
  output logic kb_data
);

  int unsigned half_period = 2500;
  int unsigned skew        = 300;
  int unsigned frames_sent = 0;

  initial begin
    kb_clk  = 1'b1;
    kb_data = 1'b1;
  end

  task automatic send_frame(input logic [10:0] frame);
    for (int b = 0; b < 11; b++) begin
      #(skew);
      kb_data = frame[b];
      #(half_period - skew);
      kb_clk = 1'b0;
      #(half_period);
      kb_clk = 1'b1;
    end
    #(skew);
    kb_data = 1'b1;
    #(4 * half_period);
    frames_sent++;
  endtask

  task automatic send_byte(input logic [7:0] data);
    send_frame({1'b1, ~^data, data, 1'b0});
  endtask

endmodule
