// pulser: flashes the centre brake lamp while the car brakes hard.
//
// While `hard_brake` is high, and for HOLD_MS (1 s) after it falls, the
// lamp is switched at FLASH_HZ (10 Hz): `lamp_off` is high for half of each
// 100 ms period and low for the other half. `lamp_off` drives the inverting
// relay in series with the lamp, so a high level turns the lamp off; when
// the pulser is idle it is low and the lamp follows the brake pedal as usual.
// The hold-over exists because a hard stop is brief, but the speed
// difference to the car behind lasts until its driver reacts.
//
// Timing: `lamp_off` is registered. It rises one clock after `hard_brake`
// rises (the first half period turns the lamp off), toggles every
// CLK_HZ/(2*FLASH_HZ) clocks, and stays active HOLD_MS after `hard_brake`
// falls. Starting each burst with the lamp off is this design's choice.
module pulser #(
  parameter int unsigned CLK_HZ   = 10_000_000,
  parameter int unsigned FLASH_HZ = 10,
  parameter int unsigned HOLD_MS  = 1000
) (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic hard_brake,
  output logic lamp_off,     // high: lamp dark
  output logic flashing      // burst in progress (hard braking or hold-over)
);

  localparam int unsigned HALF     = CLK_HZ / (2 * FLASH_HZ);
  localparam longint unsigned HOLD = longint'(CLK_HZ) / 1000 * HOLD_MS;
  localparam int unsigned HW       = $clog2(HALF + 1);
  localparam int unsigned DW       = $clog2(HOLD + 1);

  logic [DW-1:0] hold;
  logic [HW-1:0] phase;
  logic          pulse;

  assign flashing = hard_brake || (hold != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      hold     <= '0;
      phase    <= '0;
      pulse    <= 1'b1;
      lamp_off <= 1'b0;
    end else begin
      if (hard_brake)       hold <= DW'(HOLD);
      else if (hold != '0)  hold <= hold - 1'b1;

      if (!flashing) begin
        phase <= '0;
        pulse <= 1'b1;
      end else if (phase == HW'(HALF - 1)) begin
        phase <= '0;
        pulse <= ~pulse;
      end else begin
        phase <= phase + 1'b1;
      end

      lamp_off <= flashing && pulse;
    end
  end

endmodule
