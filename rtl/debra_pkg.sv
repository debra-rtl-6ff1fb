// debra_pkg: types and constants shared by the brake-alert and
// performance-meter blocks.
//
// Acceleration is carried as a 12-bit two's complement number in which
// 1024 counts are 1 g, so the range is -2 g .. +2 g (the range of the
// accelerometer). The display modes and trial states are enums so that the
// performance controller and the LCD controller agree on their encoding;
// the numeric values are this design's own choice.
package debra_pkg;

  // Acceleration in 1/1024 g.
  typedef logic signed [11:0] accel_t;

  // The five things the display can show.
  typedef enum logic [2:0] {
    MODE_READY   = 3'd0,   // system ready, no trial selected
    MODE_SIXTY   = 3'd1,   // 0-60 mph acceleration trial
    MODE_BRAKE   = 3'd2,   // braking trial
    MODE_QUARTER = 3'd3,   // quarter-mile trial
    MODE_FREERUN = 3'd4    // free-running stopwatch
  } mode_e;

  // Where the selected trial stands.
  typedef enum logic [1:0] {
    ST_WAIT = 2'd0,        // selected, waiting for the trigger
    ST_RUN  = 2'd1,        // timing
    ST_DONE = 2'd2         // finished, time frozen
  } status_e;

  // The dashboard panel: one push button each.
  typedef struct packed {
    logic freerun;
    logic quarter;
    logic sixty;
    logic brake;
    logic reset;
  } buttons_t;

  // Three BCD digits of the stopwatch: [2] tens of seconds, [1] seconds,
  // [0] tenths of a second.
  typedef logic [2:0][3:0] bcd3_t;

  // Layout of the LCD text PROM (see lcd_prom).
  localparam int unsigned LCD_A_BLANK   = 0;    // blank character
  localparam int unsigned LCD_A_INIT    = 5;    // 3 set-up commands, last is clear
  localparam int unsigned LCD_A_LINE1   = 8;    // command: cursor to line 1
  localparam int unsigned LCD_A_DIGIT0  = 9;    // '0'..'9'
  localparam int unsigned LCD_A_DOT     = 20;   // '.'
  localparam int unsigned LCD_A_LINE2   = 21;   // command: cursor to line 2
  localparam int unsigned LCD_A_MSG     = 64;   // first message
  localparam int unsigned LCD_MSG_SLOT  = 64;   // bytes per message slot
  localparam int unsigned LCD_MSG_LEN   = 40;   // characters per line
  localparam int unsigned LCD_NUM_MSG   = 8;

  // Clock cycles that last at least the given number of microseconds
  // (rounded up, at least one), for minimum hold and wait times.
  function automatic int unsigned us_to_cycles(int unsigned clk_hz, int unsigned us);
    longint unsigned c;
    c = (longint'(clk_hz) * longint'(us) + 64'd999_999) / 64'd1_000_000;
    return (c == 0) ? 1 : int'(c);
  endfunction

endpackage
