// tb_debra_top: end-to-end test of the whole system at a reduced clock
// (CLK_HZ = 200 kHz; every time constant in the design scales with it).
//
// A behavioural accelerometer with ringing edges and a behavioural LCD are
// attached. The car is calibrated at rest, then runs a 0-60 trial at
// 1.5 g, a braking trial with a hard stop (which must flash the lamp, ask
// the radio to broadcast and hold the flashing for one second), a warning
// received from another car (which must play the sound), a free-running
// timer and a quarter-mile trial at 0.5 g. Expected trial times come from
// the acceleration the design reports and the physical targets worked out
// here. Each mechanism is counted and a mechanism that never occurred is
// a failure.
`timescale 1ns/1ps
module tb_debra_top;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ   = 200_000;
  localparam real         CLK_NS   = 1.0e9 / CLK_HZ;
  localparam int unsigned HALF_10HZ = CLK_HZ / 20;

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

  always #(CLK_NS / 2) clk = ~clk;

  debra_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .btn_raw, .accel_x_pwm(x_pwm), .accel_y_pwm(y_pwm), .rf_rx, .rf_tx,
    .lamp_off, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .sound_addr,
    .sound_playing, .calibrated, .lamp_flashing, .accel, .mode, .status, .time_bcd);

  adxl202_model u_accel (.gx_mg, .gy_mg, .xout(x_pwm), .yout(y_pwm));
  hd44780_model u_lcd (.data(lcd_data), .rs(lcd_rs), .rw(lcd_rw), .en(lcd_en));

  // ------------------------------------------------------------ mechanisms
  int n_debounced = 0, n_calibrated = 0, n_hard_brake = 0, n_lamp_edges = 0;
  int n_holdover = 0, n_rf_tx = 0, n_sound_steps = 0, n_frames = 0;
  int n_start [5] = '{0, 0, 0, 0, 0};
  int n_done  [5] = '{0, 0, 0, 0, 0};
  logic    lamp_d, rf_tx_d, cal_d, hold_d;
  status_e status_d;
  longint  t_lamp_edge = -1;
  logic [15:0] sound_d;
  int      pwm_raw_edges = 0, pwm_sync_edges = 0;
  logic    x_d;

  always @(x_pwm) pwm_raw_edges++;

  always @(posedge clk) begin
    cyc      <= cyc + 1;
    lamp_d   <= lamp_off;
    rf_tx_d  <= rf_tx;
    cal_d    <= calibrated;
    status_d <= status;
    sound_d  <= sound_addr;
    hold_d   <= lamp_flashing && !rf_tx;
    x_d      <= dut.pwm[0];
    if (dut.pwm[0] != x_d) pwm_sync_edges++;
    if (calibrated && !cal_d) n_calibrated++;
    if (rf_tx && !rf_tx_d) begin n_rf_tx++; n_hard_brake++; end
    if (lamp_flashing && !rf_tx && !hold_d) n_holdover++;
    if (sound_addr != sound_d && sound_playing) n_sound_steps++;
    if (status == ST_RUN && status_d != ST_RUN) n_start[mode]++;
    if (status == ST_DONE && status_d != ST_DONE) n_done[mode]++;
    if (lamp_off != lamp_d && cyc > 10) begin
      n_lamp_edges++;
      // While the hard stop lasts, edges are half a 10 Hz period apart.
      if (t_lamp_edge >= 0 && rf_tx && lamp_flashing) begin
        checks++;
        if (cyc - t_lamp_edge != HALF_10HZ) begin
          failures++;
          $display("FAIL: lamp edges %0d clocks apart, expected %0d", cyc - t_lamp_edge, HALF_10HZ);
        end
      end
      t_lamp_edge <= cyc;
    end
    if (dut.lcd_frame_done) n_frames++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic wait_clocks(input longint n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_ms(input int ms);
    wait_clocks(longint'(ms) * CLK_HZ / 1000);
  endtask

  task automatic press_btn(input int which);
    @(negedge clk);
    btn_raw = buttons_t'(5'b1 << which);
    wait_ms(20);
    btn_raw = '0;
    wait_ms(1);
  endtask

  function automatic int tenths(input bcd3_t b);
    return 100 * b[2] + 10 * b[1] + b[0];
  endfunction

  function automatic string pad40(input string s);
    while (s.len() < 40) s = {s, " "};
    return s;
  endfunction

  task automatic expect_lcd(input string l1, input string l2);
    int f0 = n_frames;
    wait (n_frames >= f0 + 2);
    check(u_lcd.text(0) == pad40(l1), $sformatf("LCD line 1 \"%s\", expected \"%s\"", u_lcd.text(0), l1));
    if (l2 != "")
      check(u_lcd.text(1) == pad40(l2), $sformatf("LCD line 2 \"%s\", expected \"%s\"", u_lcd.text(1), l2));
  endtask

  // Run a timed trial to its end; the expected time in tenths comes from the
  // number of milliseconds `ms` the trial should need.
  task automatic expect_time(input int ms, input string what);
    int got = tenths(time_bcd);
    int exp_t = ms / 100;
    check(got >= exp_t - 1 && got <= exp_t + 1,
          $sformatf("%s shows %0d tenths, expected about %0d", what, got, exp_t));
  endtask

  initial begin
    wait_clocks(7_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g, v60, dq, vv, dd;
    int n, a_rep;
    string t2;
    g   = 9.80665;
    v60 = 60.0 * 0.44704 / g * 1024.0 * 1000.0;
    dq  = 402.336 / (32.0 * g / 1024.0 * 1e-6);
    btn_raw = '0;
    rf_rx = 1'b0;

    // ---- Power on, press reset at rest on level ground.
    wait_ms(5);
    press_btn(0);
    wait_ms(150);
    check(calibrated, "orientation stored 0.1 s after reset");
    check(accel > -12'sd20 && accel < 12'sd20 && !rf_tx && !lamp_off, "at rest: no acceleration, no alert");
    expect_lcd("System Ready", "Press a button to start");

    // ---- 0-60 trial at 1.5 g forward (the sensor's x axis points back).
    press_btn(2);
    expect_lcd("0-60 Acceleration time trial", "Start Acceleration to start trial");
    gx_mg = -1500;
    wait_ms(10);
    a_rep = int'(accel);
    check(a_rep > 1450 && a_rep < 1620, $sformatf("1.5 g read as %0d", a_rep));
    check(status == ST_RUN, "0-60 trial running");
    wait (status == ST_DONE);
    n = int'($ceil(v60 / a_rep));
    expect_time(n, "0-60");
    expect_lcd("0-60 Acceleration time trial", "");
    t2 = u_lcd.text(1);
    check(t2.substr(0, 3) == $sformatf("%1d%1d.%1d", time_bcd[2], time_bcd[1], time_bcd[0])
          || t2.substr(0, 3) == $sformatf(" %1d.%1d", time_bcd[1], time_bcd[0]),
          $sformatf("LCD shows the 0-60 time: \"%s\"", t2.substr(0, 3)));
    gx_mg = 0;
    wait_ms(50);

    // ---- Braking trial with a hard stop: 0.6 g for 0.5 s.
    press_btn(1);
    expect_lcd("Braking time trial", "Start Deceleration to start trial");
    gx_mg = 600;
    wait_ms(20);
    check(rf_tx && lamp_flashing, "hard braking: radio warning and flashing lamp");
    check(status == ST_RUN, "braking trial running");
    // A warning from another car arrives meanwhile.
    @(negedge clk) rf_rx = 1'b1;
    wait_ms(2);
    rf_rx = 1'b0;
    check(sound_playing, "received warning plays the sound");
    wait_ms(480);
    gx_mg = 0;
    wait_ms(10);
    check(status == ST_DONE, "braking trial ends when the car is at rest");
    expect_time(500, "braking trial");
    check(!rf_tx && lamp_flashing, "lamp keeps flashing after the hard stop");
    wait_ms(800);
    check(lamp_flashing, "still flashing 0.8 s after the stop");
    wait_ms(300);
    check(!lamp_flashing && !lamp_off, "flashing over 1 s after the stop");

    // ---- Free-running timer.
    press_btn(4);
    wait_ms(350);
    check(mode == MODE_FREERUN && status == ST_RUN, "free run running");
    check(tenths(time_bcd) == 3, $sformatf("free run shows %0d tenths after 0.35 s", tenths(time_bcd)));
    expect_lcd("Free running time trial", "");

    // ---- Quarter mile at 0.5 g.
    press_btn(3);
    expect_lcd("Quarter mile time trial", "Start Acceleration to start trial");
    gx_mg = -500;
    wait_ms(10);
    a_rep = int'(accel);
    wait (status == ST_DONE);
    vv = 0; dd = 0; n = 0;
    while (dd < dq) begin
      dd += $floor(vv / 32.0);
      vv += a_rep;
      n++;
    end
    expect_time(n, "quarter mile");
    gx_mg = 0;
    wait_ms(1);

    // ---- Every mechanism must have happened.
    check(pwm_raw_edges > pwm_sync_edges, "ringing accelerometer edges were debounced");
    check(n_calibrated == 1, "calibration");
    check(n_start[MODE_SIXTY] == 1 && n_done[MODE_SIXTY] == 1, "0-60 trial started and finished");
    check(n_start[MODE_BRAKE] == 1 && n_done[MODE_BRAKE] == 1, "braking trial started and finished");
    check(n_start[MODE_QUARTER] == 1 && n_done[MODE_QUARTER] == 1, "quarter-mile trial started and finished");
    check(n_start[MODE_FREERUN] == 1, "free-run timer started");
    check(n_hard_brake >= 1 && n_rf_tx >= 1, "hard braking and radio request");
    check(n_lamp_edges >= 10, $sformatf("%0d lamp edges", n_lamp_edges));
    check(n_holdover >= 1, "hold-over after hard braking");
    check(n_sound_steps > 100, $sformatf("%0d sound samples played", n_sound_steps));
    check(n_frames > 10, "LCD frames written");
    check(u_lcd.timing_errors == 0, $sformatf("%0d LCD bus timing violations", u_lcd.timing_errors));
    $display("mechanisms: debounced=%0d calibrated=%0d starts=%p done=%p hard_brake=%0d lamp_edges=%0d holdover=%0d sound=%0d frames=%0d",
             pwm_raw_edges - pwm_sync_edges, n_calibrated, n_start, n_done, n_hard_brake, n_lamp_edges,
             n_holdover, n_sound_steps, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
