// counter: the stopwatch of the performance trials.
//
// Three BCD digits count tenths of a second up to 99.9 s. `zero` clears the
// digits and stops the watch, `start` starts it and restarts the 0.1 s
// prescaler (so the first tenth is a full tenth), `stop` freezes it. If more
// than one is high, zero wins over start and start over stop. At 99.9 s the
// watch holds its value.
//
// Timing: a digit changes CLK_HZ/10 clocks after `start` and every CLK_HZ/10
// clocks after that. Holding at 99.9 s rather than rolling over is this
// design's choice.
module counter
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 10_000_000,
  parameter int unsigned TICK_HZ = 10
) (
  input  logic  clk,
  input  logic  rst,      // synchronous, active high
  input  logic  zero,
  input  logic  start,
  input  logic  stop,
  output bcd3_t bcd,      // [2] tens of s, [1] s, [0] tenths
  output logic  running
);

  localparam int unsigned TICK = CLK_HZ / TICK_HZ;
  localparam int unsigned TW   = $clog2(TICK + 1);

  logic [TW-1:0] pre;
  logic          tick;

  assign tick = (pre == TW'(TICK - 1));

  always_ff @(posedge clk) begin
    if (rst || zero) begin
      bcd     <= '0;
      running <= 1'b0;
      pre     <= '0;
    end else if (start) begin
      running <= 1'b1;
      pre     <= '0;
    end else if (stop) begin
      running <= 1'b0;
    end else if (running) begin
      pre <= tick ? '0 : pre + 1'b1;
      if (tick && bcd != {4'd9, 4'd9, 4'd9}) begin
        if (bcd[0] != 4'd9) begin
          bcd[0] <= bcd[0] + 4'd1;
        end else begin
          bcd[0] <= 4'd0;
          if (bcd[1] != 4'd9) begin
            bcd[1] <= bcd[1] + 4'd1;
          end else begin
            bcd[1] <= 4'd0;
            bcd[2] <= bcd[2] + 4'd1;
          end
        end
      end
    end
  end

endmodule
