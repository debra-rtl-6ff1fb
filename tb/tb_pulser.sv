// tb_pulser: self-checking test of the brake-lamp pulser. With CLK_HZ =
// 20 kHz half a 10 Hz period is 1000 clocks and the one-second hold-over
// 20000 clocks. Every clock the lamp output is compared with a reference
// worked out from the clock at which hard braking began and ended.
`timescale 1ns/1ps
module tb_pulser;
  localparam int unsigned CLK_HZ = 20_000;
  localparam int unsigned HALF   = CLK_HZ / 20;
  localparam int unsigned HOLD   = CLK_HZ;

  logic   clk = 1'b0, rst, hard_brake, lamp_off, flashing;
  int     checks = 0, failures = 0;
  longint cyc = 0;
  int     toggles = 0;
  logic   lamp_d;

  always #5 clk = ~clk;

  pulser #(.CLK_HZ(CLK_HZ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One burst: hard braking for `len` clocks, then watch past the hold.
  task automatic burst(input int len);
    longint t_rise, t_fall, c;
    bit exp_off;
    @(negedge clk) hard_brake = 1'b1;
    t_rise = cyc + 1;                 // first clock edge that sees it
    repeat (len) @(negedge clk);
    hard_brake = 1'b0;
    t_fall = cyc + 1;
    // Check from the rise to well after the hold-over.
    while (cyc < t_fall + HOLD + 3 * HALF) begin
      @(negedge clk);
      c = cyc;                        // the edge that produced lamp_off
      exp_off = (c >= t_rise) && (c <= t_fall + HOLD - 1) && (((c - t_rise) / HALF) % 2 == 0);
      checks++;
      if (lamp_off !== exp_off) begin
        checks--;
        check(1'b0, $sformatf("lamp_off %0b expected %0b", lamp_off, exp_off));
        break;
      end
    end
  endtask

  always @(posedge clk) begin
    cyc    <= cyc + 1;
    lamp_d <= lamp_off;
    if (lamp_off != lamp_d) toggles++;
  end

  initial begin
    rst = 1'b1;
    hard_brake = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (100) @(negedge clk);
    check(!lamp_off && !flashing, "idle: lamp not touched");
    burst(5 * HALF + 123);            // long hard stop
    check(!lamp_off && !flashing, "idle after hold-over");
    toggles = 0;
    burst(7);                         // a brief jab still gives a full second
    // 7 clocks plus one second is 20 whole half periods of the 10 Hz
    // flashing and 7 clocks of a 21st, which is a dark one: 21 edges that
    // start half periods and one at the end of the burst.
    check(toggles == 22, $sformatf("%0d lamp edges after a brief jab, expected 22", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
