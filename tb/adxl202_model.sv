// adxl202_model: behavioural model of a 2-axis +/-2 g accelerometer with
// duty-cycle outputs, for testbenches only.
//
// Each axis is a square wave of period PERIOD_NS (1.7 ms) whose duty cycle
// is ZERO_DUTY (53 %) at 0 g and changes by DUTY_PER_G (12.5 %) per g. The
// accelerations are given in milli-g on `gx_mg` / `gy_mg` and are sampled at
// the start of each period. Every edge rings BOUNCES extra times, one
// transition every BOUNCE_NS, before it settles; `edges` counts the settled
// edges and `bounce_edges` the extra ones.
`timescale 1ns/1ps
module adxl202_model #(
  parameter real PERIOD_NS  = 1_700_000.0,
  parameter real ZERO_DUTY  = 0.53,
  parameter real DUTY_PER_G = 0.125,
  parameter int  BOUNCES    = 2,
  parameter real BOUNCE_NS  = 2_000.0,
  parameter real Y_PHASE_NS = 400_000.0
) (
  input  int   gx_mg,
  input  int   gy_mg,
  output logic xout,
  output logic yout
);
  int   edges = 0, bounce_edges = 0;
  logic out [2];

  assign xout = out[0];
  assign yout = out[1];

  for (genvar a = 0; a < 2; a++) begin : g_axis
    initial begin
      real duty, t_high;
      out[a] = 1'b0;
      if (a == 1) #(Y_PHASE_NS);
      forever begin
        duty = ZERO_DUTY + DUTY_PER_G * real'((a == 0) ? gx_mg : gy_mg) / 1000.0;
        if (duty < 0.05) duty = 0.05;
        if (duty > 0.95) duty = 0.95;
        t_high = duty * PERIOD_NS;
        for (int e = 0; e < 2; e++) begin
          // e = 0: rising edge and high phase, e = 1: falling edge and low phase
          for (int b = 0; b < BOUNCES; b++) begin
            out[a] = (e == 1);
            #(BOUNCE_NS / 2);
            out[a] = (e == 0);
            #(BOUNCE_NS / 2);
            bounce_edges += 2;
          end
          out[a] = (e == 0);
          edges++;
          #(((e == 0) ? t_high : PERIOD_NS - t_high) - BOUNCES * BOUNCE_NS);
        end
      end
    end
  end
endmodule
