// tb_keyboard_top - end-to-end test of the keyboard-to-display design at its
// default parameters.
//
// A PS/2 keyboard model sends scan code set 2 frames at 20 kHz into the top
// level, clocked at 100 MHz. After each key action the testbench watches
// the multiplexed display pins for one full refresh period, rebuilds the
// four characters from the enables and segment lines, and compares them
// with the expected text (newest key at the right):
//   reset                     -> all dark
//   1..6 pressed and released -> "   1", "  12", " 123", "1234", "2345", "3456"
//   A (1C)                    -> "456E"    (non-digit key)
//   up arrow (E0 75, E0 F0 75)-> "56EE"    (extended key)
//   7 held: 3D 3D, then break -> "EE77"    (auto-repeat)
//   Pause (E1 14 77 E1 F0 14 F0 77) -> "E77E"
//   reset                     -> all dark again
// The bargraph output sc must equal the last byte received after every
// frame. Each mechanism (reset blanking, shift-in, a digit falling off the
// left, break dropped, error key, extended make, extended break dropped,
// auto-repeat, Pause) is counted and must occur at least once. The delay
// from the keyboard clock's last falling edge of a frame to the update of
// the display buffer is checked to be 4 system clock cycles.
module tb_keyboard_top;

  localparam int unsigned CLK_HALF     = 5;       // 100 MHz: 10 units per cycle
  localparam int unsigned REFRESH_LEN  = 1 << 18; // default refresh period

  logic       sys_clk = 1'b0;
  logic       rst;
  logic       kb_clk, kb_data;
  logic [7:0] sc;
  logic [6:0] num;
  logic [3:0] seg_en;
  int         checks = 0;
  int         failures = 0;

  typedef enum int {
    M_RESET_BLANK, M_SHIFT, M_OVERFLOW, M_BREAK, M_ERROR_KEY, M_EXT_MAKE,
    M_EXT_BREAK, M_REPEAT, M_PAUSE, M_COUNT
  } mech_t;
  int mech [M_COUNT];

  keyboard_top dut (.*);
  ps2_keyboard_model u_kb (.kb_clk(kb_clk), .kb_data(kb_data));

  always #(CLK_HALF) sys_clk = ~sys_clk;

  initial begin
    repeat (20_000_000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- latency from the last keyboard clock fall to the buffer update ----
  int unsigned cycle = 0;
  int unsigned last_fall_cycle = 0;
  int          latency_checks = 0;
  logic [7:0]  snap_code  [4];
  logic        snap_valid [4];

  always @(posedge sys_clk) cycle <= cycle + 1;
  always @(negedge kb_clk) last_fall_cycle = cycle;

  always @(posedge sys_clk) begin
    #1;
    if (!rst) begin
      logic changed;
      changed = 1'b0;
      for (int i = 0; i < 4; i++)
        if (snap_code[i] !== dut.u_ctrl.disp_code[i] ||
            snap_valid[i] !== dut.u_ctrl.disp_valid[i]) changed = 1'b1;
      if (changed) begin
        latency_checks++;
        checks++;
        if (cycle - last_fall_cycle != 4) begin
          failures++;
          $display("buffer update %0d cycles after the last clock fall",
                   cycle - last_fall_cycle);
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      snap_code[i]  = dut.u_ctrl.disp_code[i];
      snap_valid[i] = dut.u_ctrl.disp_valid[i];
    end
  end

  // ---- reading the display pins ----
  function automatic byte decode(input logic [6:0] seg_lines);
    string      chars = "0123456789E";
    string      segs[11] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                             "acdefg", "abc", "abcdefg", "abcdfg", "adefg"};
    logic [6:0] m;
    for (int c = 0; c < 11; c++) begin
      m = '0;
      for (int i = 0; i < segs[c].len(); i++) m[3'(segs[c][i] - "a")] = 1'b1;
      if (~seg_lines == m) return chars[c];
    end
    return "?";
  endfunction

  // Returns the display as 4 characters, leftmost (AN3) first; ' ' = dark.
  task automatic read_display(output string text);
    byte shown [4];
    foreach (shown[i]) shown[i] = " ";
    repeat (REFRESH_LEN + 8) begin
      @(posedge sys_clk);
      #2;
      if ($countones(~seg_en) > 1) begin
        failures++;
        $display("more than one digit enabled: %b", seg_en);
      end
      for (int p = 0; p < 4; p++)
        if (!seg_en[p]) begin
          byte ch;
          ch = decode(num);
          if (shown[p] != " " && shown[p] != ch) begin
            failures++;
            $display("position %0d flickers between %c and %c", p, shown[p], ch);
          end
          shown[p] = ch;
        end
    end
    text = {shown[3], shown[2], shown[1], shown[0]};
  endtask

  task automatic expect_display(input string expected, input string what);
    string got;
    read_display(got);
    checks++;
    if (got != expected) begin
      failures++;
      $display("%s: display \"%s\" expected \"%s\"", what, got, expected);
    end else begin
      $display("%s: display \"%s\"", what, got);
    end
  endtask

  task automatic send(input logic [7:0] b);
    u_kb.send_byte(b);
    checks++;
    if (sc !== b) begin
      failures++;
      $display("bargraph shows %h after byte %h", sc, b);
    end
  endtask

  task automatic press_release(input logic [7:0] code);
    send(code);
    send(8'hF0);
    send(code);
    mech[M_BREAK]++;
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (4) @(posedge sys_clk);
    #1 rst = 1'b0;
  endtask

  initial begin
    static logic [7:0] digit_keys[10] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25,
                                   8'h2E, 8'h36, 8'h3D, 8'h3E, 8'h46};
    static string after_digit[7] = '{"", "   1", "  12", " 123", "1234", "2345", "3456"};
    foreach (mech[i]) mech[i] = 0;
    do_reset();
    expect_display("    ", "after reset");
    mech[M_RESET_BLANK]++;

    for (int d = 1; d <= 6; d++) begin
      press_release(digit_keys[d]);
      mech[M_SHIFT]++;
      if (d > 4) mech[M_OVERFLOW]++;
      expect_display(after_digit[d], $sformatf("press %0d", d));
    end

    press_release(8'h1C);                       // 'A'
    mech[M_ERROR_KEY]++;
    expect_display("456E", "press A");

    send(8'hE0); send(8'h75);                   // up arrow make
    mech[M_EXT_MAKE]++;
    send(8'hE0); send(8'hF0); send(8'h75);      // up arrow break
    mech[M_EXT_BREAK]++;
    expect_display("56EE", "press up arrow");

    send(digit_keys[7]); send(digit_keys[7]);   // '7' held: repeated make
    send(8'hF0); send(digit_keys[7]);
    mech[M_REPEAT]++;
    expect_display("EE77", "hold 7");

    send(8'hE1); send(8'h14); send(8'h77); send(8'hE1);
    send(8'hF0); send(8'h14); send(8'hF0); send(8'h77);
    mech[M_PAUSE]++;
    expect_display("E77E", "press Pause");

    do_reset();
    expect_display("    ", "after second reset");
    mech[M_RESET_BLANK]++;

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("mechanism %s never exercised", mech_t'(m));
      end
    end
    checks++;
    if (latency_checks != 11) begin
      failures++;
      $display("expected 11 buffer updates, saw %0d", latency_checks);
    end
    $display("frames sent %0d, buffer updates %0d", u_kb.frames_sent, latency_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
