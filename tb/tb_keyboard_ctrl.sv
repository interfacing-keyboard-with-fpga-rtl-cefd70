// tb_keyboard_ctrl - self-checking test of the keyboard controller.
//
// A stream of scan code set 2 sequences is fed to the controller one byte at
// a time with random gaps: plain make codes, break sequences (F0 xx),
// extended makes (E0 xx) and breaks (E0 F0 xx) and the 8-byte Pause
// sequence. After every byte the four display slots are compared with a
// reference computed by re-parsing the whole byte history in the testbench:
// every complete key press adds one entry (its code, E0 for an extended key,
// E1 for Pause) and the slots must show the last four entries, newest in
// slot 0, with unused slots empty. The buffer must change at the clock edge
// that samples valid_code. The press sequence "123456" from the lab hints is
// included.
module tb_keyboard_ctrl;
  import kb_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       valid_code;
  scan_code_t scan_code_in;
  scan_code_t disp_code  [NUM_DIGITS];
  logic       disp_valid [NUM_DIGITS];
  int         checks = 0;
  int         failures = 0;

  scan_code_t history[$];
  int n_make = 0, n_break = 0, n_ext = 0, n_ext_break = 0, n_pause = 0;

  keyboard_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: list of presses found in the byte history.
  function automatic void ref_presses(output scan_code_t p[$]);
    int i;
    p = {};
    i = 0;
    while (i < history.size()) begin
      if (history[i] == 8'hF0) begin
        i += 2;
      end else if (history[i] == 8'hE0) begin
        if (i + 1 < history.size()) begin
          if (history[i+1] == 8'hF0) i += 3;
          else begin p.push_back(8'hE0); i += 2; end
        end else i += 2;
      end else if (history[i] == 8'hE1) begin
        p.push_back(8'hE1);
        i += 8;
      end else begin
        p.push_back(history[i]);
        i += 1;
      end
    end
  endfunction

  task automatic check_display(input string what);
    scan_code_t p[$];
    ref_presses(p);
    for (int s = 0; s < NUM_DIGITS; s++) begin
      checks++;
      if (s < p.size()) begin
        if (!disp_valid[s] || disp_code[s] !== p[p.size()-1-s]) begin
          failures++;
          $display("%s: slot %0d = %b/%h expected %h", what, s, disp_valid[s],
                   disp_code[s], p[p.size()-1-s]);
        end
      end else if (disp_valid[s]) begin
        failures++;
        $display("%s: slot %0d should be empty", what, s);
      end
    end
  endtask

  task automatic send(input scan_code_t b);
    repeat ($urandom_range(2)) @(posedge clk);
    #1;
    scan_code_in = b;
    valid_code   = 1'b1;
    @(posedge clk);
    #1;
    valid_code   = 1'b0;
    scan_code_in = 8'($urandom);  // no effect without valid_code
    history.push_back(b);
    check_display($sformatf("byte %0d (%h)", history.size(), b));
    @(posedge clk);
    #1;
    check_display("one cycle later");
  endtask

  function automatic scan_code_t random_key();
    scan_code_t k;
    do k = 8'($urandom_range(8'h01, 8'h83));
    while (k == 8'hE0 || k == 8'hE1 || k == 8'hF0);
    return k;
  endfunction

  initial begin
    static scan_code_t digit_keys[10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25,
                                   8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
    rst = 1'b1; valid_code = 1'b0; scan_code_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check_display("after reset");
    // "123456", each pressed and released
    for (int d = 1; d <= 6; d++) begin
      send(digit_keys[d]); n_make++;
      send(8'hF0); send(digit_keys[d]); n_break++;
    end
    checks++;
    if (disp_code[3] != 8'h26 || disp_code[0] != 8'h36) begin
      failures++;
      $display("123456 did not leave 3456 on the display");
    end
    // random traffic
    for (int n = 0; n < 600; n++) begin
      int kind;
      scan_code_t k;
      kind = $urandom_range(9);
      k = ($urandom_range(1) == 0) ? digit_keys[$urandom_range(9)] : random_key();
      case (kind)
        0, 1, 2: begin send(k); n_make++; end
        3, 4, 5: begin send(8'hF0); send(k); n_break++; end
        6: begin send(8'hE0); send(k); n_ext++; end
        7: begin send(8'hE0); send(8'hF0); send(k); n_ext_break++; end
        8: begin
          send(8'hE1); send(8'h14); send(8'h77); send(8'hE1);
          send(8'hF0); send(8'h14); send(8'hF0); send(8'h77); n_pause++;
        end
        default: begin send(k); send(k); n_make += 2; end  // auto-repeat
      endcase
    end
    checks++;
    if (n_make == 0 || n_break == 0 || n_ext == 0 || n_ext_break == 0 || n_pause == 0) begin
      failures++;
      $display("a sequence kind never occurred");
    end
    $display("make=%0d break=%0d ext=%0d ext_break=%0d pause=%0d", n_make,
             n_break, n_ext, n_ext_break, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
