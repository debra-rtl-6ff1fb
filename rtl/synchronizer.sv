// synchronizer: brings the asynchronous dashboard buttons and the two
// accelerometer duty-cycle lines into the clock domain.
//
// Every input passes through two flip-flops. The two accelerometer lines are
// then debounced: the output follows the synchronised line, but after each
// accepted change it is frozen for LOCKOUT_US (25 us), so ringing on an edge
// produces exactly one transition. The accelerometer never changes level
// faster than about 500 us, so the lockout never hides a real edge. The
// buttons are only synchronised, not debounced (the controller that reads
// them acts on levels, so bounce on a button is harmless).
//
// Timing: a button reaches `btn` two clocks after it is sampled; an
// accelerometer edge reaches `pwm` three clocks after it is sampled.
// There is no reset input: the synchronised reset button is itself one of
// the outputs. The lockout counters need no reset because they only ever
// count down to zero.
module synchronizer
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 10_000_000,
  parameter int unsigned LOCKOUT_US = 25
) (
  input  logic     clk,
  input  buttons_t btn_raw,   // asynchronous buttons
  input  logic [1:0] pwm_raw, // asynchronous accelerometer lines, [0]=x [1]=y
  output buttons_t btn,       // synchronised buttons
  output logic [1:0] pwm      // synchronised, debounced accelerometer lines
);

  localparam int unsigned LOCKOUT = us_to_cycles(CLK_HZ, LOCKOUT_US);
  localparam int unsigned LW      = $clog2(LOCKOUT + 1);

  buttons_t   btn_meta;
  logic [1:0] pwm_meta, pwm_sync;

  always_ff @(posedge clk) begin
    btn_meta <= btn_raw;
    btn      <= btn_meta;
    pwm_meta <= pwm_raw;
    pwm_sync <= pwm_meta;
  end

  for (genvar i = 0; i < 2; i++) begin : g_debounce
    logic [LW-1:0] lock;
    always_ff @(posedge clk) begin
      if (lock != '0) begin
        lock <= lock - 1'b1;
      end else if (pwm_sync[i] != pwm[i]) begin
        pwm[i] <= pwm_sync[i];
        lock   <= LW'(LOCKOUT - 1);
      end
    end
  end

endmodule
