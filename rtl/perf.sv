// perf: controller of the performance trials (0-60 mph, quarter mile,
// braking, free-running stopwatch).
//
// Integrators. While a trial runs, the 12-bit acceleration (1/1024 g) is
// added once per millisecond to a 24-bit velocity accumulator, so velocity
// is in g*ms/1024. The top 19 bits of the velocity (velocity / 32) are added
// each millisecond to a 31-bit distance accumulator. Velocity is signed, so
// a car that slows down mid-trial loses speed correctly; the distance is
// unsigned (a quarter mile needs 1.31e9 of its 2.1e9 counts), and the
// signed velocity is added to it modulo 2^31.
//
// Trials. Pressing a button selects its trial: the stopwatch is zeroed (for
// as long as the button is held), the display mode changes and the status is
// WAIT. After release the trial waits for its trigger, then clears the
// integrators, starts the stopwatch and goes to RUN:
//   0-60     trigger: acceleration above 0.2 g; stop: velocity >= 60 mph
//   quarter  trigger: acceleration above 0.2 g; stop: distance >= 402.336 m
//   braking  trigger: deceleration above 0.1 g; stop: deceleration <= 0.1 g
//            again (the car has come to rest)
//   free run starts at release and never stops; pressing again restarts it
// On the stop condition the stopwatch is stopped and the status is DONE.
// The targets are worked out from the units above with g = 9.80665 m/s^2:
//   V_TARGET = v[m/s] * 1024 * 1000 / g        (60 mph -> 2,800,766)
//   D_TARGET = d[m] * 1024 * 1e6 / (32 * g)    (402.336 m -> 1,312,859,335)
// SPEED_MPH = 30 turns the 0-60 trial into a 0-30 trial.
//
// Timing: zero/start/stop are one-clock pulses except zero, which is high
// while a trial button is held. The trigger is acted on the clock after it
// is seen. Button priority when several are held: free run, quarter, 0-60,
// braking. The thresholds are the source design's 0.2 g / 0.1 g rounded to
// 1/1024 g; the status encoding and the priority are this design's choice.
module perf
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 10_000_000,
  parameter int unsigned SPEED_MPH    = 60,
  parameter int unsigned DIST_MM      = 402_336,   // a quarter mile
  parameter int          ACCEL_START  = 205,       // 0.2 g
  parameter int          BRAKE_START  = 102        // 0.1 g
) (
  input  logic    clk,
  input  logic    rst,        // synchronous, active high
  input  logic    brake_btn,
  input  logic    sixty_btn,
  input  logic    quarter_btn,
  input  logic    freerun_btn,
  input  accel_t  accel,
  output logic    zero,       // to the stopwatch
  output logic    start,
  output logic    stop,
  output mode_e   mode,       // to the display
  output status_e status,
  output logic signed [23:0] vel,   // velocity, g*ms/1024
  output logic [30:0]        distance   // distance, 32*g*ms^2/1024 (unsigned)
);

  localparam int unsigned MS_CYC = CLK_HZ / 1000;
  localparam int unsigned MW     = $clog2(MS_CYC + 1);
  // 1 mph = 0.44704 m/s; g = 9.80665 m/s^2 (980665 / 100000)
  localparam longint V_TARGET = (longint'(SPEED_MPH) * 44704 * 1_024_000) / 980_665;
  localparam longint D_TARGET = (longint'(DIST_MM) * 1_024_000_000 * 100) / (32 * 980_665);

  logic [MW-1:0] ms_cnt;
  logic          ms_tick;
  logic          any_btn;
  logic [30:0]   vel_ext;
  logic          trigger, finished;

  assign any_btn = brake_btn | sixty_btn | quarter_btn | freerun_btn;
  assign ms_tick = (ms_cnt == MW'(MS_CYC - 1));
  assign vel_ext = 31'(vel >>> 5);    // top 19 bits, sign-extended

  always_comb begin
    unique case (mode)
      MODE_SIXTY, MODE_QUARTER: trigger = accel > 12'(ACCEL_START);
      MODE_BRAKE:               trigger = -13'(accel) > 13'(BRAKE_START);
      MODE_FREERUN:             trigger = 1'b1;
      default:                  trigger = 1'b0;
    endcase
    unique case (mode)
      MODE_SIXTY:   finished = 32'(vel) >= 32'(V_TARGET);
      MODE_QUARTER: finished = distance >= 31'(D_TARGET);
      MODE_BRAKE:   finished = -13'(accel) <= 13'(BRAKE_START);
      default:      finished = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mode   <= MODE_READY;
      status <= ST_WAIT;
      zero   <= 1'b1;
      start  <= 1'b0;
      stop   <= 1'b0;
      vel    <= '0;
      distance   <= '0;
      ms_cnt <= '0;
    end else begin
      zero  <= 1'b0;
      start <= 1'b0;
      stop  <= 1'b0;
      if (any_btn) begin
        // Select (or reselect) a trial and hold it armed.
        if (freerun_btn)      mode <= MODE_FREERUN;
        else if (quarter_btn) mode <= MODE_QUARTER;
        else if (sixty_btn)   mode <= MODE_SIXTY;
        else                  mode <= MODE_BRAKE;
        status <= ST_WAIT;
        zero   <= 1'b1;
      end else begin
        unique case (status)
          ST_WAIT: if (mode != MODE_READY && trigger) begin
            status <= ST_RUN;
            start  <= 1'b1;
            vel    <= '0;
            distance   <= '0;
            ms_cnt <= '0;
          end
          ST_RUN: begin
            if (ms_tick) begin
              ms_cnt <= '0;
              vel    <= vel + 24'(accel);
              distance   <= distance + vel_ext;
            end else begin
              ms_cnt <= ms_cnt + 1'b1;
            end
            if (finished) begin
              status <= ST_DONE;
              stop   <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // The stopwatch controls are never raised together.
  a_ctrl_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0({zero, start, stop}))
    else $error("perf: more than one stopwatch control at once");

endmodule
