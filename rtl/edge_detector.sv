// edge_detector - finds falling edges of the synchronized PS/2 clock.
//
// The synchronized keyboard clock is delayed by one system clock cycle in a
// flip-flop and compared with its current value: the old value 1 and the new
// value 0 mean a falling edge. edge_found is then high for exactly one
// system clock cycle. It is used as a clock enable, never as a clock, so the
// whole design stays in the single system clock domain.
//
// Interface: kb_clk_sync is the output of the synchronizer; edge_found is
// the one-cycle pulse.
// Timing: edge_found is combinational from the delay flip-flop and
// kb_clk_sync, so it rises in the same cycle kb_clk_sync first shows 0.
//
// The delay-and-compare structure follows the lab description. The
// synchronous, active-high reset to the idle level 1 is this design's choice.
module edge_detector (
  input  logic clk,
  input  logic rst,
  input  logic kb_clk_sync,
  output logic edge_found
);

  logic kb_clk_old;

  always_ff @(posedge clk) begin
    if (rst) kb_clk_old <= 1'b1;
    else     kb_clk_old <= kb_clk_sync;
  end

  assign edge_found = kb_clk_old & ~kb_clk_sync;

endmodule
