// debra_top: the brake-alert and performance-meter board: the FPGA logic
// together with the text PROM of the dashboard display.
//
// Alert path. The accelerometer's two duty-cycle lines are synchronised and
// debounced, converted to g and rotated against the rest orientation
// (transform). Hard braking (> 0.3 g) makes the pulser flash the centre
// brake lamp at 10 Hz (plus one second of hold-over) and raises `rf_tx`,
// the request to the radio module to broadcast a warning. A warning
// received by the radio arrives on `rf_rx` and starts the spoken warning
// (sound_ctrl), which steps the address of the external sound PROM.
//
// Performance path. The acceleration feeds the trial controller (perf),
// which runs the 0-60, quarter-mile, braking and free-run trials and drives
// the stopwatch (counter); the display controller (lcd_ctrl) streams the
// matching texts and the time from the text PROM (lcd_prom) to the LCD.
//
// The reset button, once synchronised, is the synchronous reset of every
// block; press it with the car at rest on level ground, since 0.1 s later
// the transform stores that orientation as "down". The radio module, the
// accelerometer, the sound PROM with its DAC, the LCD and the lamp relay are
// outside this module; their signals are the ports.
//
// The per-axis readings, the velocity and distance accumulators, the
// stopwatch's running flag and the display's frame strobe are block outputs
// for testing; the top leaves them unconnected on purpose, and synthesis
// removes what only they would use. `lcd_rw` is tied low: the display is
// only ever written.
module debra_top
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ = 10_000_000
) (
  input  logic        clk,
  input  buttons_t    btn_raw,      // dashboard buttons, asynchronous
  input  logic        accel_x_pwm,  // accelerometer duty-cycle outputs
  input  logic        accel_y_pwm,
  input  logic        rf_rx,        // radio: warning packet received
  output logic        rf_tx,        // radio: broadcast a warning
  output logic        lamp_off,     // lamp relay: high turns the brake lamp off
  output logic [7:0]  lcd_data,     // LCD data pins (driven by the text PROM)
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic [15:0] sound_addr,   // sound PROM address
  output logic        sound_playing,
  output logic        calibrated,   // rest orientation has been stored
  output logic        lamp_flashing,// alert burst in progress
  output accel_t      accel,        // acceleration along the car, 1/1024 g
  output mode_e       mode,         // trial shown on the display
  output status_e     status,
  output bcd3_t       time_bcd      // stopwatch, dd.d seconds
);

  localparam int unsigned LCD_ADDR_W = 10;

  buttons_t   btn;
  logic [1:0] pwm;
  logic       rst;
  logic       hard_brake;
  accel_t     x_g, y_g, braking;
  logic       sw_zero, sw_start, sw_stop, sw_running;
  logic signed [23:0] vel;
  logic [30:0] distance;
  logic [LCD_ADDR_W-1:0] lcd_prom_addr;
  logic       lcd_frame_done;

  synchronizer #(.CLK_HZ(CLK_HZ)) u_sync (
    .clk, .btn_raw,
    .pwm_raw ({accel_y_pwm, accel_x_pwm}),
    .btn     (btn),
    .pwm     (pwm)
  );

  assign rst = btn.reset;

  transform #(.CLK_HZ(CLK_HZ)) u_transform (
    .clk, .rst, .pwm,
    .x_g, .y_g, .cal_done(calibrated), .braking, .accel, .hard_brake
  );

  pulser #(.CLK_HZ(CLK_HZ)) u_pulser (
    .clk, .rst, .hard_brake, .lamp_off, .flashing(lamp_flashing)
  );

  assign rf_tx = hard_brake;

  sound_ctrl #(.CLK_HZ(CLK_HZ)) u_sound (
    .clk, .rst, .go_raw(rf_rx), .addr(sound_addr), .playing(sound_playing)
  );

  perf #(.CLK_HZ(CLK_HZ)) u_perf (
    .clk, .rst,
    .brake_btn  (btn.brake),
    .sixty_btn  (btn.sixty),
    .quarter_btn(btn.quarter),
    .freerun_btn(btn.freerun),
    .accel,
    .zero (sw_zero), .start(sw_start), .stop(sw_stop),
    .mode, .status, .vel, .distance
  );

  counter #(.CLK_HZ(CLK_HZ)) u_counter (
    .clk, .rst, .zero(sw_zero), .start(sw_start), .stop(sw_stop),
    .bcd(time_bcd), .running(sw_running)
  );

  lcd_ctrl #(.CLK_HZ(CLK_HZ), .ADDR_W(LCD_ADDR_W)) u_lcd (
    .clk, .rst, .mode, .status, .bcd(time_bcd),
    .prom_addr (lcd_prom_addr),
    .lcd_rs, .lcd_en,
    .frame_done(lcd_frame_done)
  );

  lcd_prom #(.ADDR_W(LCD_ADDR_W)) u_lcd_prom (
    .addr(lcd_prom_addr), .data(lcd_data)
  );

  assign lcd_rw = 1'b0;   // the display is only written

endmodule
