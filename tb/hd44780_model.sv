// hd44780_model: behavioural model of a 2 x 40 character LCD with an
// HD44780-style controller on an 8-bit bus, for testbenches only.
//
// A byte is taken on the falling edge of E: with RS low it is a command
// (clear, entry/display/function set, set DDRAM address), with RS high a
// character written at the cursor, which then moves right. The model keeps
// the two lines of display memory, and checks the bus timing: data and RS
// must have been steady for at least SETUP_NS before E rises and stay
// steady while E is high, and nothing may be sent during the 1.52 ms a
// clear takes. Violations are counted in `timing_errors`.
`timescale 1ns/1ps
module hd44780_model #(
  parameter real SETUP_NS = 42_000.0,
  parameter real CLEAR_NS = 1_520_000.0
) (
  input logic [7:0] data,
  input logic       rs,
  input logic       rw,
  input logic       en
);
  logic [7:0] line [2][40];
  int         cursor_line = 0, cursor_pos = 0;
  int         commands = 0, chars = 0, clears = 0, timing_errors = 0;
  bit         display_on = 0, two_lines = 0;
  realtime    t_change = 0, t_busy_until = 0;

  initial foreach (line[l, p]) line[l][p] = 8'h20;

  always @(data or rs) begin
    if (en) timing_errors++;
    t_change = $realtime;
  end

  always @(posedge en) begin
    if ($realtime - t_change < SETUP_NS) timing_errors++;
    if ($realtime < t_busy_until) timing_errors++;
    if (rw) timing_errors++;
  end

  always @(negedge en) begin
    if (!rs) begin
      commands++;
      if (data[7]) begin
        cursor_line = (data[6:0] >= 7'h40) ? 1 : 0;
        cursor_pos  = int'(data[6:0]) - (cursor_line ? 'h40 : 0);
      end else if (data[5]) begin
        two_lines = data[3];
      end else if (data[3]) begin
        display_on = data[2];
      end else if (data[0]) begin
        foreach (line[l, p]) line[l][p] = 8'h20;
        cursor_line  = 0;
        cursor_pos   = 0;
        clears++;
        t_busy_until = $realtime + CLEAR_NS;
      end
    end else begin
      chars++;
      if (cursor_pos < 40) line[cursor_line][cursor_pos] = data;
      cursor_pos++;
    end
  end

  // Text of one line, the blank character 0xFE shown as a space.
  function automatic string text(input int l);
    string s = "";
    for (int p = 0; p < 40; p++)
      s = {s, string'((line[l][p] == 8'hFE) ? 8'h20 : line[l][p])};
    return s;
  endfunction
endmodule
