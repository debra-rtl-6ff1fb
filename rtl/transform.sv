// transform: turns the accelerometer's two duty-cycle signals into a signed
// acceleration along the car and a hard-braking flag.
//
// Duty-cycle measurement (per axis). Two 15-bit counters restart on every
// rising edge of the axis' PWM line: one counts every clock (the period),
// the other only while the line is high. On the next rising edge the high
// count times 8192 and the period are handed to a 32-bit sequential divider;
// 32 clocks later the quotient (0..8192 for 0..100 % duty) comes back. The
// sensor reads 0 g at 53 % duty and moves 12.5 % per g, so subtracting 4342
// leaves the axis reading in 1/1024 g, saturated to 12 bits.
//
// Orientation. After reset the block waits CAL_DELAY_MS (0.1 s) for both
// axes to be measured and stores them as xr, yr: the direction of gravity
// with the car at rest on level ground. From then on
//     braking = (x * yr - y * xr) / 1024
// is the force component perpendicular to gravity, i.e. along the car, in
// 1/1024 g. `accel` is its negative and `hard_brake` is set while braking
// exceeds BRAKE_THRESH (0.3 g). Before the orientation is stored both read 0.
//
// Timing: an axis reading is updated 34 clocks after the clock that samples the rising PWM edge
// that ends a period; braking/accel/hard_brake follow two clocks later.
// The measurement, divider, offset and cross product follow the source
// design; the saturation of out-of-range values, the rounding of 0.3 g to
// 307 counts and the divider's handshake are this design's choices.
// The dividers' remainders are not needed and are left unused.
module transform
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 10_000_000,
  parameter int unsigned CAL_DELAY_MS  = 100,
  parameter int unsigned CNT_W         = 15,
  parameter int unsigned ZERO_G_OFFSET = 4342,   // quotient at 0 g (53 %)
  parameter int          BRAKE_THRESH  = 307     // 0.3 g in 1/1024 g
) (
  input  logic       clk,
  input  logic       rst,         // synchronous, active high
  input  logic [1:0] pwm,         // synchronised PWM lines, [0]=x [1]=y
  output accel_t     x_g,         // latest x reading, 1/1024 g
  output accel_t     y_g,         // latest y reading, 1/1024 g
  output logic       cal_done,    // rest orientation has been stored
  output accel_t     braking,     // deceleration along the car
  output accel_t     accel,       // acceleration along the car (= -braking)
  output logic       hard_brake   // braking > BRAKE_THRESH
);

  localparam int unsigned DIV_W     = 32;
  localparam longint unsigned CAL_CYC = longint'(CLK_HZ) / 1000 * CAL_DELAY_MS;
  localparam int unsigned CAL_W     = $clog2(CAL_CYC + 1);

  accel_t axis_g [2];

  // Saturate a signed value to the 12-bit acceleration range.
  function automatic accel_t sat12(input logic signed [31:0] v);
    if (v > 32'sd2047)       return 12'sd2047;
    else if (v < -32'sd2048) return -12'sd2048;
    else                     return accel_t'(v);
  endfunction

  for (genvar a = 0; a < 2; a++) begin : g_axis
    logic             prev;
    logic             seen_edge;     // one full period has been seen
    logic [CNT_W-1:0] tot_cnt, hi_cnt;
    logic             div_start, div_busy, div_done;
    logic [DIV_W-1:0] dividend, divisor, quotient, remainder;
    logic             rise;

    assign rise = pwm[a] && !prev;

    always_ff @(posedge clk) begin
      if (rst) begin
        prev      <= 1'b0;
        seen_edge <= 1'b0;
        tot_cnt   <= '0;
        hi_cnt    <= '0;
        div_start <= 1'b0;
        dividend  <= '0;
        divisor   <= '0;
      end else begin
        prev      <= pwm[a];
        div_start <= 1'b0;
        if (rise) begin
          // A period ends here: hand it to the divider if it is complete.
          if (seen_edge && !div_busy && tot_cnt != '0) begin
            dividend  <= DIV_W'({hi_cnt, 13'b0});
            divisor   <= DIV_W'(tot_cnt);
            div_start <= 1'b1;
          end
          seen_edge <= 1'b1;
          tot_cnt   <= CNT_W'(1);
          hi_cnt    <= CNT_W'(1);
        end else begin
          if (tot_cnt != '1) tot_cnt <= tot_cnt + 1'b1;
          if (pwm[a] && hi_cnt != '1) hi_cnt <= hi_cnt + 1'b1;
        end
      end
    end

    divider #(.WIDTH(DIV_W)) u_div (
      .clk, .rst,
      .start    (div_start),
      .dividend (dividend),
      .divisor  (divisor),
      .busy     (div_busy),
      .done     (div_done),
      .quotient (quotient),
      .remainder(remainder)
    );

    always_ff @(posedge clk) begin
      if (rst)           axis_g[a] <= '0;
      else if (div_done) axis_g[a] <= sat12(signed'(quotient) - 32'(ZERO_G_OFFSET));
    end
  end

  assign x_g = axis_g[0];
  assign y_g = axis_g[1];

  // Rest orientation, captured once after reset.
  logic [CAL_W-1:0] cal_cnt;
  accel_t           xr, yr;

  always_ff @(posedge clk) begin
    if (rst) begin
      cal_cnt  <= '0;
      cal_done <= 1'b0;
      xr       <= '0;
      yr       <= '0;
    end else if (!cal_done) begin
      if (cal_cnt == CAL_W'(CAL_CYC - 1)) begin
        xr       <= x_g;
        yr       <= y_g;
        cal_done <= 1'b1;
      end else begin
        cal_cnt <= cal_cnt + 1'b1;
      end
    end
  end

  // Cross product with the rest orientation.
  logic signed [24:0] xprod;
  logic signed [31:0] scaled;

  always_comb begin
    xprod  = 25'(x_g * yr) - 25'(y_g * xr);
    scaled = 32'(xprod >>> 10);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      braking    <= '0;
      accel      <= '0;
      hard_brake <= 1'b0;
    end else begin
      braking    <= sat12(scaled);
      accel      <= sat12(-scaled);
      hard_brake <= cal_done && (scaled > 32'(BRAKE_THRESH));
    end
  end

endmodule
