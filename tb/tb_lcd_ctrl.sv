// tb_lcd_ctrl: self-checking test of the LCD controller together with the
// text PROM and a behavioural display. CLK_HZ = 1 MHz, so one clock is
// 1 us: a byte takes 1 + 42 + 1 clocks (new address, hold, enable) and a
// frame of 82 bytes 3608 clocks.
// Checks the set-up sequence, the bus timing, the text shown for each mode
// and status, the stopwatch digits and the frame period.
`timescale 1ns/1ps
module tb_lcd_ctrl;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int unsigned FRAME  = 82 * 44;

  logic       clk = 1'b0, rst;
  mode_e      mode;
  status_e    status;
  bcd3_t      bcd;
  logic [9:0] prom_addr;
  logic [7:0] data;
  logic       lcd_rs, lcd_en, frame_done;
  int         checks = 0, failures = 0;
  longint     cyc = 0, t_frame = 0;
  int         frames = 0;

  always #500 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && frame_done) begin
      if (frames > 0 && cyc - t_frame != FRAME) begin
        failures++;
        $display("FAIL: frame took %0d clocks, expected %0d", cyc - t_frame, FRAME);
      end
      checks++;
      frames++;
      t_frame = cyc;
    end
  end

  lcd_ctrl #(.CLK_HZ(CLK_HZ)) dut (.clk, .rst, .mode, .status, .bcd,
                                   .prom_addr, .lcd_rs, .lcd_en, .frame_done);
  lcd_prom u_prom (.addr(prom_addr), .data);
  hd44780_model u_lcd (.data, .rs(lcd_rs), .rw(1'b0), .en(lcd_en));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic string pad40(input string s);
    while (s.len() < 40) s = {s, " "};
    return s;
  endfunction

  // Change what is shown and wait for two complete frames.
  task automatic show(input mode_e m, input status_e s, input bcd3_t b,
                      input string l1, input string l2);
    int f0;
    @(negedge clk);
    mode = m;
    status = s;
    bcd = b;
    f0 = frames;
    wait (frames >= f0 + 2);
    check(u_lcd.text(0) == pad40(l1), $sformatf("line 1 \"%s\", expected \"%s\"", u_lcd.text(0), l1));
    check(u_lcd.text(1) == pad40(l2), $sformatf("line 2 \"%s\", expected \"%s\"", u_lcd.text(1), l2));
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_READY;
    status = ST_WAIT;
    bcd = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (frames >= 1);
    check(u_lcd.clears == 1 && u_lcd.display_on && u_lcd.two_lines, "display set up once");
    check(cyc >= 15_000 + 2_000, "set-up waited for power-up and clear");
    show(MODE_READY, ST_WAIT, '0, "System Ready", "Press a button to start");
    show(MODE_SIXTY, ST_WAIT, '0, "0-60 Acceleration time trial", "Start Acceleration to start trial");
    show(MODE_SIXTY, ST_RUN, {4'd1, 4'd2, 4'd3}, "0-60 Acceleration time trial", "12.3");
    show(MODE_BRAKE, ST_WAIT, '0, "Braking time trial", "Start Deceleration to start trial");
    show(MODE_BRAKE, ST_DONE, {4'd0, 4'd4, 4'd7}, "Braking time trial", " 4.7");
    show(MODE_QUARTER, ST_WAIT, '0, "Quarter mile time trial", "Start Acceleration to start trial");
    show(MODE_QUARTER, ST_DONE, {4'd9, 4'd8, 4'd0}, "Quarter mile time trial", "98.0");
    show(MODE_FREERUN, ST_WAIT, '0, "Free running time trial", " 0.0");
    show(MODE_FREERUN, ST_RUN, {4'd5, 4'd0, 4'd6}, "Free running time trial", "50.6");
    check(u_lcd.timing_errors == 0, $sformatf("%0d bus timing violations", u_lcd.timing_errors));
    check(u_lcd.clears == 1, "no further clears");
    check(u_lcd.chars == 80 * frames + 80 * 0 || u_lcd.chars >= 80 * frames,
          $sformatf("%0d characters for %0d frames", u_lcd.chars, frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
