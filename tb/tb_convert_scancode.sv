// tb_convert_scancode - self-checking test of the serial-to-parallel
// converter.
//
// 300 frames of random bytes are sent as 11 bits each (start 0, data LSB
// first, odd parity, stop 1), one bit per edge_found pulse, with random idle
// cycles between pulses. valid_scan_code must be high in exactly the cycle
// after the 11th pulse of each frame (and never else) and scan_code_out must
// then hold the byte that was sent.
module tb_convert_scancode;
  import kb_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       edge_found;
  logic       serial_data;
  logic       valid_scan_code;
  scan_code_t scan_code_out;
  int         checks = 0;
  int         failures = 0;

  convert_scancode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int valids;
    valids = 0;
    rst = 1'b1; edge_found = 1'b0; serial_data = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < 300; f++) begin
      logic [7:0]  data;
      logic [10:0] frame;
      data  = 8'($urandom);
      frame = {1'b1, ~^data, data, 1'b0};
      for (int b = 0; b < 11; b++) begin
        // idle cycles with a changing data line: must not be sampled
        repeat ($urandom_range(3)) begin
          serial_data = 1'($urandom);
          @(posedge clk);
          #1;
          checks++;
          if (valid_scan_code) begin
            failures++;
            $display("frame %0d: valid outside frame end", f);
          end
        end
        serial_data = frame[b];
        edge_found  = 1'b1;
        @(posedge clk);
        #1;
        edge_found = 1'b0;
        checks++;
        if (valid_scan_code !== (b == 10)) begin
          failures++;
          $display("frame %0d bit %0d: valid=%b", f, b, valid_scan_code);
        end
        if (b == 10) begin
          valids++;
          checks++;
          if (scan_code_out !== data) begin
            failures++;
            $display("frame %0d: code %h expected %h", f, scan_code_out, data);
          end
        end
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (valid_scan_code !== 1'b0 || valids != 300) begin
      failures++;
      $display("valid stuck or frames lost: %0d", valids);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
