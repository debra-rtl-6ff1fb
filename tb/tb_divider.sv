// tb_divider: self-checking test of the sequential divider. Random and
// corner-case operands are compared with the language's / and %, and the
// latency from start to done is checked to be WIDTH clocks.
`timescale 1ns/1ps
module tb_divider;
  localparam int unsigned WIDTH = 32;

  logic             clk = 1'b0, rst;
  logic             start;
  logic [WIDTH-1:0] dividend, divisor, quotient, remainder;
  logic             busy, done;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  divider dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [WIDTH-1:0] a, input logic [WIDTH-1:0] b);
    int lat;
    logic [WIDTH-1:0] q, r;
    @(negedge clk);
    dividend = a;
    divisor  = b;
    start    = 1'b1;
    @(negedge clk);
    start    = 1'b0;
    lat      = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    q = (b == 0) ? '1 : a / b;
    r = (b == 0) ? a  : a % b;
    check(quotient == q, $sformatf("%0d / %0d gave %0d, expected %0d", a, b, quotient, q));
    if (b != 0) check(remainder == r, $sformatf("%0d %% %0d gave %0d, expected %0d", a, b, remainder, r));
    check(lat - 1 == WIDTH, $sformatf("latency %0d, expected %0d", lat - 1, WIDTH));
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    start = 1'b0;
    dividend = '0;
    divisor = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // The duty-cycle case: high count * 8192 over the period.
    divide(32'(9010) << 13, 32'd17000);
    divide(32'(17000) << 13, 32'd17000);
    divide(32'd0, 32'd5);
    divide(32'hFFFF_FFFF, 32'd1);
    divide(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    divide(32'd7, 32'd9);
    divide(32'd123, 32'd0);
    for (int k = 0; k < 200; k++)
      divide($urandom, (k % 2) ? $urandom : 32'($urandom_range(1, 70000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
