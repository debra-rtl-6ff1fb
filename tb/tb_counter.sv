// tb_counter: self-checking test of the stopwatch. With CLK_HZ = 1000 one
// tenth of a second is 100 clocks. Checks counting, the BCD carries, stop,
// restart, zero and the hold at 99.9 s.
`timescale 1ns/1ps
module tb_counter;
  import debra_pkg::*;
  localparam int unsigned CLK_HZ = 1000;
  localparam int unsigned TICK   = CLK_HZ / 10;

  logic  clk = 1'b0, rst, zero, start, stop, running;
  bcd3_t bcd;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  counter #(.CLK_HZ(CLK_HZ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int value(input bcd3_t b);
    return 100 * b[2] + 10 * b[1] + b[0];
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; zero = 1'b0; start = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(value(bcd) == 0 && !running, "cleared by reset");

    // Start and sample after whole tenths (plus half a tenth of margin).
    pulse(start);
    for (int k = 1; k <= 25; k++) begin
      repeat (TICK) @(negedge clk);
      check(value(bcd) == k, $sformatf("after %0d tenths shows %0d", k, value(bcd)));
      foreach (bcd[d]) check(bcd[d] <= 4'd9, "digit is BCD");
    end
    // Exact tick: the first change comes TICK clocks after start.
    pulse(zero);
    pulse(start);
    repeat (TICK - 1) @(negedge clk);
    check(value(bcd) == 0, "no change before a full tenth");
    @(negedge clk);
    check(value(bcd) == 1, "change after exactly one tenth");

    // Stop freezes.
    pulse(stop);
    repeat (5 * TICK) @(negedge clk);
    check(value(bcd) == 1 && !running, "stop freezes the time");
    // Start resumes.
    pulse(start);
    repeat (3 * TICK) @(negedge clk);
    check(value(bcd) == 4, $sformatf("resume counts on, shows %0d", value(bcd)));
    // Zero clears and stops.
    pulse(zero);
    repeat (2 * TICK) @(negedge clk);
    check(value(bcd) == 0 && !running, "zero clears and stops");

    // Run past 99.9 s: holds there.
    pulse(start);
    repeat (1005 * TICK) @(negedge clk);
    check(value(bcd) == 999, $sformatf("holds at 99.9, shows %0d", value(bcd)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
