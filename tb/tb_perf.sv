// tb_perf: self-checking test of the performance-trial controller. With
// CLK_HZ = 10 kHz a millisecond is 10 clocks. The acceleration is driven
// directly. Expected stop times come from integrating the same acceleration
// in the testbench against the 60 mph and quarter-mile targets, which are
// worked out here in floating point from the physical units.
`timescale 1ns/1ps
module tb_perf;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 10_000;
  localparam int unsigned MS     = CLK_HZ / 1000;

  logic    clk = 1'b0, rst;
  logic    brake_btn, sixty_btn, quarter_btn, freerun_btn;
  accel_t  accel;
  logic    zero, start, stop;
  mode_e   mode;
  status_e status;
  logic signed [23:0] vel;
  logic [30:0] distance;
  int      checks = 0, failures = 0;
  longint  cyc = 0, t_start = -1, t_stop = -1;
  int      n_start = 0, n_stop = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && start) begin t_start <= cyc; n_start <= n_start + 1; end
    if (!rst && stop)  begin t_stop  <= cyc; n_stop  <= n_stop + 1;  end
  end

  perf #(.CLK_HZ(CLK_HZ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1'b1;
    repeat (3) @(negedge clk);
    check(zero && status == ST_WAIT, "button held: stopwatch zeroed, trial waiting");
    b = 1'b0;
    @(negedge clk);
  endtask

  // Milliseconds of constant acceleration a until velocity reaches v.
  function automatic int ms_to_speed(input int a, input real v);
    return int'($ceil(v / a));
  endfunction

  // Milliseconds until the distance accumulator reaches d (velocity is
  // added in units of 32 before it is updated).
  function automatic int ms_to_distance(input int a, input real d);
    longint vv = 0, dd = 0;
    int n = 0;
    while (dd < longint'(d)) begin
      dd += vv >>> 5;
      vv += a;
      n++;
    end
    return n;
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog mode=%s status=%s vel=%0d dist=%0d", mode.name(), status.name(), vel, distance);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g, v60, dq;
    int n, a;
    g   = 9.80665;
    v60 = 60.0 * 0.44704 / g * 1024.0 * 1000.0;     // g*ms/1024
    dq  = 402.336 / (32.0 * g / 1024.0 * 1e-6);      // 32*g*ms^2/1024
    brake_btn = 0; sixty_btn = 0; quarter_btn = 0; freerun_btn = 0;
    accel = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(mode == MODE_READY && status == ST_WAIT, "ready after reset");

    // ---- 0-60 at 1 g.
    press(sixty_btn);
    check(mode == MODE_SIXTY, "0-60 selected");
    accel = 12'sd205;                          // exactly 0.2 g: no trigger
    repeat (50) @(negedge clk);
    check(status == ST_WAIT && n_start == 0, $sformatf("0.2 g does not start the trial %s %0d %s", status.name(), n_start, mode.name()));
    a = 1024;
    accel = accel_t'(a);
    repeat (3) @(negedge clk);
    check(status == ST_RUN && n_start == 1, "acceleration starts the trial");
    wait (status == ST_DONE);
    repeat (2) @(negedge clk);
    n = ms_to_speed(a, v60);
    check(n_stop == 1, "one stop");
    check(t_stop - t_start == longint'(n) * MS + 1,
          $sformatf("0-60 took %0d clocks, expected %0d", t_stop - t_start, n * MS + 1));
    check(int'(vel) == n * a, $sformatf("velocity %0d, expected %0d", vel, n * a));
    repeat (500) @(negedge clk);
    check(status == ST_DONE && int'(vel) == n * a, "finished trial stays frozen");

    // ---- Quarter mile at 0.5 g (the 24-bit velocity holds up to about
    // 80 m/s, so a realistic acceleration is used).
    press(quarter_btn);
    check(mode == MODE_QUARTER, "quarter mile selected");
    a = 512;
    accel = accel_t'(a);
    wait (status == ST_DONE);
    repeat (2) @(negedge clk);
    n = ms_to_distance(a, dq);
    check(n_start == 2 && n_stop == 2, "quarter mile started and stopped");
    check(t_stop - t_start == longint'(n) * MS + 1,
          $sformatf("quarter mile took %0d clocks, expected %0d", t_stop - t_start, n * MS + 1));

    // ---- Braking: starts above 0.1 g deceleration, ends when it is over.
    accel = '0;
    press(brake_btn);
    check(mode == MODE_BRAKE, "braking selected");
    accel = -12'sd102;                         // 0.1 g exactly: nothing
    repeat (50) @(negedge clk);
    check(status == ST_WAIT, "0.1 g does not start the braking trial");
    accel = -12'sd600;
    repeat (3) @(negedge clk);
    check(status == ST_RUN && n_start == 3, "deceleration starts the braking trial");
    repeat (4000) @(negedge clk);
    check(status == ST_RUN, "still braking");
    accel = -12'sd20;                          // car at rest
    repeat (3) @(negedge clk);
    check(status == ST_DONE && n_stop == 3, "braking trial ends at rest");
    check(t_stop - t_start == 4000 + 3 + 1 - 1 || t_stop - t_start == 4000 + 3 + 1,
          $sformatf("braking trial lasted %0d clocks", t_stop - t_start));

    // ---- Free run: starts on release, restarts on every press, never stops.
    accel = '0;
    press(freerun_btn);
    repeat (2) @(negedge clk);
    check(mode == MODE_FREERUN && status == ST_RUN && n_start == 4, "free run starts on release");
    repeat (20_000) @(negedge clk);
    check(status == ST_RUN && n_stop == 3, "free run keeps running");
    press(freerun_btn);
    repeat (2) @(negedge clk);
    check(status == ST_RUN && n_start == 5, "free run restarts on a new press");

    // ---- A car that slows before reaching 60 mph keeps its speed count.
    press(sixty_btn);
    accel = 12'sd1024;
    repeat (1000 * MS) @(negedge clk);
    accel = -12'sd512;
    repeat (1000 * MS) @(negedge clk);
    accel = 12'sd1024;
    repeat (5) @(negedge clk);
    check(status == ST_RUN, "0-60 continues through a slowdown");
    check(vel > 24'sd500_000 && vel < 24'sd530_000,
          $sformatf("velocity after +1 g 1 s, -0.5 g 1 s is %0d, expected about 512000", vel));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
