// tb_debra_full: the whole system at its default parameters (10 MHz clock),
// through one complete alert and braking-trial operation.
//
// The car is calibrated at rest, the braking trial is selected, and the car
// brakes hard (0.6 g) for 0.35 s. Checked: the display texts, the radio
// request, the lamp flashing at exactly 10 Hz (500,000 clocks per half
// period), the one-second hold-over, the braking-trial time, and the
// warning sound stepping one sample every 625 clocks when a warning is
// received.
`timescale 1ns/1ps
module tb_debra_full;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 10_000_000;

  logic        clk = 1'b0;
  buttons_t    btn_raw;
  logic        x_pwm, y_pwm, rf_rx, rf_tx, lamp_off;
  logic [7:0]  lcd_data;
  logic        lcd_rs, lcd_rw, lcd_en;
  logic [15:0] sound_addr;
  logic        sound_playing, calibrated, lamp_flashing;
  accel_t      accel;
  mode_e       mode;
  status_e     status;
  bcd3_t       time_bcd;
  int          gx_mg = 0, gy_mg = 1000;
  int          checks = 0, failures = 0;
  longint      cyc = 0;
  longint      t_edge = -1;
  int          lamp_edges = 0;
  logic        lamp_d;

  always #50 clk = ~clk;

  debra_top dut (
    .clk, .btn_raw, .accel_x_pwm(x_pwm), .accel_y_pwm(y_pwm), .rf_rx, .rf_tx,
    .lamp_off, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .sound_addr,
    .sound_playing, .calibrated, .lamp_flashing, .accel, .mode, .status, .time_bcd);

  adxl202_model u_accel (.gx_mg, .gy_mg, .xout(x_pwm), .yout(y_pwm));
  hd44780_model u_lcd (.data(lcd_data), .rs(lcd_rs), .rw(lcd_rw), .en(lcd_en));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  always @(posedge clk) begin
    cyc    <= cyc + 1;
    lamp_d <= lamp_off;
    if (cyc > 10 && lamp_off != lamp_d) begin
      lamp_edges++;
      if (t_edge >= 0 && rf_tx) begin
        checks++;
        if (cyc - t_edge != 500_000) begin
          failures++;
          $display("FAIL: lamp edges %0d clocks apart, expected 500000", cyc - t_edge);
        end
      end
      t_edge <= cyc;
    end
  end

  task automatic wait_ms(input int ms);
    repeat (longint'(ms) * 10_000) @(negedge clk);
  endtask

  function automatic string pad40(input string s);
    while (s.len() < 40) s = {s, " "};
    return s;
  endfunction

  task automatic expect_lcd(input string l1, input string l2);
    wait_ms(8);     // two display frames
    check(u_lcd.text(0) == pad40(l1), $sformatf("LCD line 1 \"%s\", expected \"%s\"", u_lcd.text(0), l1));
    check(u_lcd.text(1) == pad40(l2), $sformatf("LCD line 2 \"%s\", expected \"%s\"", u_lcd.text(1), l2));
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    btn_raw = '0;
    rf_rx = 1'b0;
    wait_ms(2);
    btn_raw.reset = 1'b1;
    wait_ms(5);
    btn_raw.reset = 1'b0;
    wait_ms(110);
    check(calibrated, "orientation stored 0.1 s after reset");
    expect_lcd("System Ready", "Press a button to start");

    btn_raw.brake = 1'b1;
    wait_ms(20);
    btn_raw.brake = 1'b0;
    expect_lcd("Braking time trial", "Start Deceleration to start trial");

    gx_mg = 600;                  // hard stop
    wait_ms(10);
    check(rf_tx && lamp_flashing, "hard braking: radio warning and flashing");
    check(status == ST_RUN, "braking trial running");
    wait_ms(340);
    gx_mg = 0;
    wait_ms(10);
    check(status == ST_DONE, "braking trial finished");
    check(time_bcd == {4'd0, 4'd0, 4'd3},
          $sformatf("braking trial shows %0d%0d.%0d s, expected 0.3", time_bcd[2], time_bcd[1], time_bcd[0]));
    expect_lcd("Braking time trial", $sformatf(" %0d.%0d", time_bcd[1], time_bcd[0]));
    check(!rf_tx && lamp_flashing, "hold-over after the stop");

    // A warning from another car.
    rf_rx = 1'b1;
    wait_ms(1);
    rf_rx = 1'b0;
    check(sound_playing, "warning sound playing");
    n = int'(sound_addr);
    repeat (6250) @(negedge clk);
    check(int'(sound_addr) == n + 10, $sformatf("10 samples in 6250 clocks, got %0d", int'(sound_addr) - n));

    wait_ms(1000);
    check(!lamp_flashing && !lamp_off, "flashing over one second after the stop");
    check(lamp_edges >= 20, $sformatf("%0d lamp edges", lamp_edges));
    check(u_lcd.timing_errors == 0, $sformatf("%0d LCD bus timing violations", u_lcd.timing_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
