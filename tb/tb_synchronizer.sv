// tb_synchronizer: self-checking test of the input synchronizer.
// Checks the two-clock latency of every button, the three-clock latency of
// an accelerometer edge, that ringing inside the 25 us lockout produces a
// single output transition, and that a clean square wave passes unchanged.
`timescale 1ns/1ps
module tb_synchronizer;
  import debra_pkg::*;

  localparam int unsigned CLK_HZ  = 10_000_000;
  localparam int unsigned LOCKOUT = 250;          // 25 us at 10 MHz

  logic       clk = 1'b0;
  buttons_t   btn_raw, btn;
  logic [1:0] pwm_raw, pwm, pwm_d;
  int         checks = 0, failures = 0;
  int         trans [2] = '{0, 0};

  always #50 clk = ~clk;

  synchronizer dut (.clk, .btn_raw, .pwm_raw, .btn, .pwm);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  always @(posedge clk) begin
    pwm_d <= pwm;
    for (int i = 0; i < 2; i++) if (pwm[i] !== pwm_d[i]) trans[i]++;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat, n0;
    buttons_t b;
    btn_raw = '0;
    pwm_raw = 2'b00;
    repeat (2 * LOCKOUT + 10) @(posedge clk);
    check(pwm == 2'b00, "pwm settles low");

    // Buttons: two-clock latency.
    for (int k = 0; k < 20; k++) begin
      @(negedge clk) b = buttons_t'($urandom);
      btn_raw = b;
      @(posedge clk);
      @(posedge clk);
      #1 check(btn == b, $sformatf("button pattern %b after two clocks", b));
    end

    // Clean accelerometer edge: three clocks.
    @(negedge clk) pwm_raw[0] = 1'b1;
    t0 = 0;
    lat = 0;
    while (pwm[0] !== 1'b1 && t0 < 20) begin
      @(posedge clk);
      #1 t0++;
    end
    check(t0 == 3, $sformatf("x edge latency %0d, expected 3", t0));

    // Ringing on the falling edge: many toggles within the lockout.
    repeat (LOCKOUT + 5) @(posedge clk);
    n0 = trans[0];
    for (int k = 0; k < 15; k++) begin
      @(negedge clk) pwm_raw[0] = ~pwm_raw[0];
      repeat ($urandom_range(1, 8)) @(posedge clk);
    end
    @(negedge clk) pwm_raw[0] = 1'b0;
    repeat (10) @(posedge clk);
    check(trans[0] - n0 == 1, $sformatf("ringing edge gave %0d transitions", trans[0] - n0));
    // The input was toggled an odd number of times then forced low, the
    // first toggle was the accepted one: output is low.
    check(pwm[0] == 1'b0, "output low after first accepted change");
    repeat (LOCKOUT + 10) @(posedge clk);
    check(pwm[0] == pwm_raw[0], "output follows the settled line after the lockout");

    // The lockout really holds for 25 us: a change 200 clocks after an
    // accepted one is delayed until the lockout ends.
    @(negedge clk) pwm_raw[1] = 1'b1;
    repeat (200) @(posedge clk);
    @(negedge clk) pwm_raw[1] = 1'b0;
    t0 = 0;
    while (pwm[1] !== 1'b0 && t0 < 400) begin
      @(posedge clk);
      #1 t0++;
    end
    check(t0 >= 45 && t0 <= 55, $sformatf("change inside lockout released after %0d clocks", t0));

    // A clean 1.7 ms square wave with 53 % duty passes with 2 transitions
    // per period.
    repeat (LOCKOUT + 10) @(posedge clk);
    n0 = trans[1];
    for (int p = 0; p < 4; p++) begin
      @(negedge clk) pwm_raw[1] = 1'b1;
      repeat (9010) @(posedge clk);
      @(negedge clk) pwm_raw[1] = 1'b0;
      repeat (7990) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    check(trans[1] - n0 == 8, $sformatf("square wave gave %0d transitions", trans[1] - n0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
