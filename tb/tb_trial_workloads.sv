// tb_trial_workloads: the performance trials under the two driving
// scenarios reported for the original system, run on the trial controller
// and the stopwatch (CLK_HZ = 10 kHz, so a millisecond is 10 clocks).
//
//  1. Bench test: the sensor tilted by 90 degrees reads exactly 1 g, and a
//     0-30 mph trial (SPEED_MPH = 30) must take 30 mph / 1 g = 1.367 s; the
//     stopwatch shows 1.3 s (the reported hand measurement was 1.4 s).
//  2. Road test: a 0-30 trial started at 15 mph; the car stops at a light,
//     waits, turns and accelerates; the trial must end when the car is
//     30 mph faster than at the start (45 mph), about 40 s later, because
//     the velocity integrator counts the slowdown as negative.
// Expected stop times are worked out here from the profile in floating
// point and compared with the stopwatch.
`timescale 1ns/1ps
module tb_trial_workloads;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 10_000;
  localparam int unsigned MS     = CLK_HZ / 1000;

  logic    clk = 1'b0, rst;
  logic    brake_btn = 0, sixty_btn = 0, quarter_btn = 0, freerun_btn = 0;
  accel_t  accel;
  logic    zero, start, stop, running;
  mode_e   mode;
  status_e status;
  bcd3_t   bcd;
  logic signed [23:0] vel;
  logic [30:0] distance;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  perf #(.CLK_HZ(CLK_HZ), .SPEED_MPH(30)) u_perf (.*);
  counter #(.CLK_HZ(CLK_HZ)) u_counter (.clk, .rst, .zero, .start, .stop, .bcd, .running);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int tenths();
    return 100 * bcd[2] + 10 * bcd[1] + bcd[0];
  endfunction

  task automatic select_trial();
    @(negedge clk) sixty_btn = 1'b1;
    repeat (5) @(negedge clk);
    sixty_btn = 1'b0;
    @(negedge clk);
  endtask

  // Apply `a` (1/1024 g) for `ms` milliseconds, or until the trial ends.
  task automatic drive(input int a, input int ms);
    accel = accel_t'(a);
    for (int i = 0; i < ms * MS && status != ST_DONE; i++) @(negedge clk);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real target, v, t_ms;
    int  exp_t, brake_ms;
    target = 30.0 * 0.44704 / 9.80665 * 1024.0 * 1000.0;   // g*ms/1024
    accel = '0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // ---- 1. Bench test, 1 g.
    select_trial();
    drive(1024, 3000);
    check(status == ST_DONE, "0-30 at 1 g finished");
    exp_t = int'($floor($ceil(target / 1024.0) / 100.0));
    check(tenths() == exp_t, $sformatf("0-30 at 1 g shows %0d tenths, expected %0d", tenths(), exp_t));
    check(tenths() >= 13 && tenths() <= 14, "close to the reported 1.4 s");

    // ---- 2. Road test: start at 15 mph (the integrator starts at 0).
    accel = '0;
    select_trial();
    v = 0.0; t_ms = 0.0;
    // Pull away from 15 mph at 0.25 g for 3 s: +16.4 mph, not yet 30.
    drive(256, 3000);  v += 256.0 * 3000; t_ms += 3000;
    check(status == ST_RUN, "trial still running below 45 mph");
    // Brake at 0.3 g to a stop at a light: back to -15 mph relative.
    brake_ms = int'($ceil((v + 15.0 * 0.44704 / 9.80665 * 1024000.0) / 307.0));
    drive(-307, brake_ms); v -= 307.0 * brake_ms; t_ms += brake_ms;
    check(status == ST_RUN && vel < 0, "stopped at the light: velocity below the start");
    // Wait at the light for 20 s, then turn right and accelerate at 0.2 g+.
    drive(0, 20_000); t_ms += 20_000;
    check(status == ST_RUN, "trial survives the wait");
    drive(300, 60_000);
    check(status == ST_DONE, "trial ends after the car gains 30 mph");
    t_ms += $ceil((target - v) / 300.0);
    exp_t = int'($floor(t_ms / 100.0));
    check(tenths() >= exp_t - 1 && tenths() <= exp_t + 1,
          $sformatf("road test shows %0d tenths, expected about %0d", tenths(), exp_t));
    check(vel >= 24'($rtoi(target)) && vel < 24'($rtoi(target)) + 24'sd300,
          $sformatf("velocity at the end %0d, target %0d", vel, $rtoi(target)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
