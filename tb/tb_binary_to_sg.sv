// tb_binary_to_sg - self-checking test of the multiplexed seven-segment
// driver, with a short refresh counter (REFRESH_BITS = 6, so each position
// is lit for 16 cycles).
//
// For many random sets of four digit codes (digits, E and blank) the driver
// is run over several refresh periods. In every cycle at most one enable
// may be low; the position that is lit must be the one the refresh counter
// selects (position k during the k-th quarter of the period, one cycle of
// output register delay); and the lit segments must match the digit, taken
// from a table of segment letters kept in the testbench. A blank position
// must never be enabled and must drive all segments off. After reset all
// enables must be high.
module tb_binary_to_sg;
  import kb_pkg::*;

  localparam int unsigned RB = 6;

  logic       clk = 1'b0;
  logic       rst;
  digit_t     digits [NUM_DIGITS];
  logic [6:0] num;
  logic [3:0] seg_en;
  int         checks = 0;
  int         failures = 0;

  binary_to_sg #(.REFRESH_BITS(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Lit segments for each code 0..15 (blank for 10..13 and 15).
  function automatic logic [6:0] lit(input digit_t d);
    string segs[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "", "", "", "",
                        "adefg", ""};
    logic [6:0] m;
    m = '0;
    for (int i = 0; i < segs[d].len(); i++) m[3'(segs[d][i] - "a")] = 1'b1;
    return m;
  endfunction

  initial begin
    int n;
    int lit_cycles;
    lit_cycles = 0;
    rst = 1'b1;
    foreach (digits[i]) digits[i] = 4'hF;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (seg_en !== 4'b1111) begin
      failures++;
      $display("enables on during reset");
    end
    rst = 1'b0;
    n = 0;
    for (int set = 0; set < 60; set++) begin
      for (int i = 0; i < NUM_DIGITS; i++) begin
        int r;
        r = $urandom_range(13);
        digits[i] = (r < 10) ? 4'(r) : (r < 12) ? 4'hE : 4'hF;
      end
      // one cycle for the new codes to reach the output register
      @(posedge clk); n++;
      #1;
      for (int c = 0; c < 3 * (1 << RB); c++) begin
        int sel;
        @(posedge clk); n++;
        #1;
        sel = ((n - 1) >> (RB - 2)) & 3;
        checks++;
        if (digits[sel] == 4'hF) begin
          if (seg_en !== 4'b1111 || num !== 7'b111_1111) begin
            failures++;
            $display("set %0d: blank position %0d driven (%b %b)", set, sel, seg_en, num);
          end
        end else begin
          lit_cycles++;
          if (seg_en !== ~(4'b0001 << sel)) begin
            failures++;
            $display("set %0d: seg_en %b, expected position %0d", set, seg_en, sel);
          end
          if (~num !== lit(digits[sel])) begin
            failures++;
            $display("set %0d pos %0d digit %h: segments %b", set, sel, digits[sel], num);
          end
        end
      end
    end
    checks++;
    if (lit_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
