// sync_keyboard - brings the PS/2 clock and data lines into the system clock
// domain.
//
// The keyboard lines change at a rate of 10-30 kHz, far below the system
// clock, so each line passes through two flip-flops in series clocked by the
// system clock (a two-stage synchronizer). The outputs only change on a
// rising edge of clk and are stable copies of the inputs, two cycles late.
//
// Interface: kb_clk/kb_data are the asynchronous lines from the keyboard
// port; kb_clk_sync/kb_data_sync are their synchronized copies.
// Timing: a change on an input shows on the output after two rising edges
// of clk (three if it arrives just after an edge).
//
// The two-flip-flop structure follows the lab description. The synchronous,
// active-high reset and the reset value of 1 (the idle level of both PS/2
// lines, so that reset does not create a false falling edge) are this
// design's choices.
module sync_keyboard (
  input  logic clk,
  input  logic rst,
  input  logic kb_clk,
  input  logic kb_data,
  output logic kb_clk_sync,
  output logic kb_data_sync
);

  logic [1:0] clk_pipe;
  logic [1:0] data_pipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_pipe  <= 2'b11;
      data_pipe <= 2'b11;
    end else begin
      clk_pipe  <= {clk_pipe[0], kb_clk};
      data_pipe <= {data_pipe[0], kb_data};
    end
  end

  assign kb_clk_sync  = clk_pipe[1];
  assign kb_data_sync = data_pipe[1];

endmodule
