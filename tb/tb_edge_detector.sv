// tb_edge_detector - self-checking test of the falling-edge detector.
//
// kb_clk_sync is driven with a random sequence that holds each level for a
// random number of cycles. In every cycle edge_found must be 1 exactly when
// the previous sampled level was 1 and the current one is 0. The number of
// pulses must equal the number of 1-to-0 steps in the sequence.
module tb_edge_detector;

  logic clk = 1'b0;
  logic rst;
  logic kb_clk_sync;
  logic edge_found;
  int   checks = 0;
  int   failures = 0;

  edge_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int   falls, pulses;
    falls = 0; pulses = 0;
    rst = 1'b1; kb_clk_sync = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    prev = 1'b1;
    for (int seg = 0; seg < 400; seg++) begin
      logic lvl;
      lvl = 1'($urandom);
      if (prev && !lvl) falls++;
      for (int k = 0; k < 1 + int'($urandom_range(4)); k++) begin
        kb_clk_sync = lvl;
        #1;
        checks++;
        if (edge_found !== (prev & ~lvl)) begin
          failures++;
          $display("seg %0d: edge_found=%b prev=%b now=%b", seg, edge_found, prev, lvl);
        end
        if (edge_found) pulses++;
        @(posedge clk);
        #1;
        prev = lvl;
      end
    end
    checks++;
    if (pulses != falls || falls == 0) begin
      failures++;
      $display("pulse count %0d, falling edges %0d", pulses, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
