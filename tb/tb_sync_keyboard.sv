// tb_sync_keyboard - self-checking test of the two-stage synchronizer.
//
// After reset both outputs must be 1 (idle level). Then kb_clk and kb_data
// are driven with random values, changing between clock edges, and each
// output is compared with the value its input had two rising edges
// earlier, kept in the testbench's own history.
module tb_sync_keyboard;

  logic clk = 1'b0;
  logic rst;
  logic kb_clk, kb_data;
  logic kb_clk_sync, kb_data_sync;
  int   checks = 0;
  int   failures = 0;

  sync_keyboard dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] hist_clk, hist_data;
    rst = 1'b1; kb_clk = 1'b0; kb_data = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (kb_clk_sync !== 1'b1 || kb_data_sync !== 1'b1) begin
      failures++;
      $display("reset value wrong: %b %b", kb_clk_sync, kb_data_sync);
    end
    rst = 1'b0;
    hist_clk = 2'b11; hist_data = 2'b11;
    for (int i = 0; i < 1000; i++) begin
      kb_clk  = 1'($urandom);
      kb_data = 1'($urandom);
      @(posedge clk);
      hist_clk  = {hist_clk[0], kb_clk};
      hist_data = {hist_data[0], kb_data};
      #1;
      checks++;
      if (kb_clk_sync !== hist_clk[1] || kb_data_sync !== hist_data[1]) begin
        failures++;
        $display("cycle %0d: got %b %b expected %b %b", i, kb_clk_sync,
                 kb_data_sync, hist_clk[1], hist_data[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
