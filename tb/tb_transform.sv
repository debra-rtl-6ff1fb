// tb_transform: self-checking test of the duty-cycle to acceleration
// transform. A square wave of known high time and period drives each axis
// (CLK_HZ = 1 MHz, so the 1.7 ms period is 1700 clocks). The expected axis
// readings are worked out from the high time and period; the expected
// braking value from those readings and the stored rest orientation. Also
// checks the 34-clock update latency, the calibration instant (0.1 s after
// reset) and the 0.3 g hard-braking threshold.
`timescale 1ns/1ps
module tb_transform;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int unsigned PERIOD = 1700;
  localparam int unsigned CAL    = 100_000;       // 0.1 s

  logic       clk = 1'b0, rst;
  logic [1:0] pwm;
  accel_t     x_g, y_g, braking, accel;
  logic       cal_done, hard_brake;
  int         checks = 0, failures = 0;
  int         hi [2];                 // high clocks per period, per axis
  longint     cyc = 0;

  always #500 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  transform #(.CLK_HZ(CLK_HZ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Axis generators: each period starts with the high phase.
  for (genvar a = 0; a < 2; a++) begin : g_gen
    initial begin
      pwm[a] = 1'b0;
      forever begin
        @(negedge clk);
        pwm[a] = 1'b1;
        repeat (hi[a]) @(negedge clk);
        pwm[a] = 1'b0;
        repeat (PERIOD - hi[a] - 1) @(negedge clk);
      end
    end
  end

  function automatic int expect_g(input int h);
    int v;
    v = (h * 8192) / PERIOD - 4342;
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return v;
  endfunction

  function automatic int expect_brake(input int x, input int y, input int xr, input int yr);
    int v;
    v = (x * yr - y * xr) >>> 10;
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return v;
  endfunction

  // Duty high time that reads g (1/1024 g units) on the sensor.
  function automatic int high_for(input int g);
    return ((4342 + g) * PERIOD + 8191) / 8192;
  endfunction

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xr, yr, ex, ey, eb, lat;
    longint t_rst;
    hi[0] = high_for(0);      // x: level, 0 g
    hi[1] = high_for(1024);   // y: gravity, 1 g
    rst = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    t_rst = cyc;

    // Before the orientation is stored nothing is reported.
    repeat (20 * PERIOD) @(negedge clk);
    check(!cal_done && braking == 0 && !hard_brake, "quiet before calibration");
    ex = expect_g(hi[0]);
    ey = expect_g(hi[1]);
    check(int'(x_g) == ex, $sformatf("x reads %0d, expected %0d", x_g, ex));
    check(int'(y_g) == ey, $sformatf("y reads %0d, expected %0d", y_g, ey));

    wait (cal_done);
    check(cyc - t_rst >= CAL - 2 && cyc - t_rst <= CAL + 2,
          $sformatf("calibrated %0d clocks after reset, expected %0d", cyc - t_rst, CAL));
    xr = ex;
    yr = ey;
    repeat (10) @(negedge clk);
    check(braking == 0 && accel == 0 && !hard_brake, "at rest: no braking");

    // Sweep the x duty through braking and acceleration values.
    for (int g = -1500; g <= 1500; g += 125) begin
      hi[0] = high_for(g);
      repeat (3 * PERIOD) @(negedge clk);
      ex = expect_g(hi[0]);
      eb = expect_brake(ex, ey, xr, yr);
      check(int'(x_g) == ex, $sformatf("x reads %0d, expected %0d", x_g, ex));
      check(int'(braking) == eb, $sformatf("braking %0d, expected %0d", braking, eb));
      check(int'(accel) == -eb, $sformatf("accel %0d, expected %0d", accel, -eb));
      check(hard_brake == (eb > 307), $sformatf("hard_brake %0b at braking %0d", hard_brake, eb));
    end

    // A tilted rest position: the cross product uses both axes.
    hi[0] = high_for(300);
    hi[1] = high_for(700);
    repeat (3 * PERIOD) @(negedge clk);
    ex = expect_g(hi[0]);
    ey = expect_g(hi[1]);
    eb = expect_brake(ex, ey, xr, yr);
    check(int'(braking) == eb, $sformatf("tilted: braking %0d, expected %0d", braking, eb));

    // Saturation beyond 2 g.
    hi[0] = 1650;
    repeat (3 * PERIOD) @(negedge clk);
    check(x_g == 12'sd2047, "x saturates at +2 g");

    // Update latency: x changes 34 clocks after the rising edge that ends
    // the period with a new duty.
    hi[0] = high_for(-200);
    @(posedge pwm[0]);
    @(posedge pwm[0]);
    // pwm rose at a falling clock edge; count rising edges from the one
    // that samples it (edge 0) to the one that updates the reading.
    lat = -1;
    do begin
      @(negedge clk);
      lat++;
    end while (int'(x_g) != expect_g(hi[0]) && lat < 200);
    check(lat == 34, $sformatf("reading updated %0d clocks after the edge, expected 34", lat));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
