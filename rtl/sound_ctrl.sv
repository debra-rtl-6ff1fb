// sound_ctrl: plays the recorded spoken warning when another car's alert is
// received.
//
// The recording sits in an external byte-wide PROM whose data pins drive a
// DAC directly, so playing it only means stepping the PROM address at the
// sample rate: one address every CLK_HZ/SAMPLE_HZ clocks (625 at 10 MHz and
// 16 kHz). The radio raises its packet-received pin asynchronously, so
// `go_raw` is synchronised with two flip-flops here; its rising edge starts
// a playback of SAMPLES samples from address 0. An edge that arrives while
// a playback runs is ignored. When idle the address rests at 0, whose
// sample is taken to be silence.
//
// Timing: `addr` leaves 0 three clocks plus one sample period after the
// rising edge of `go_raw`; `playing` is high from the clock after the
// synchronised edge until the last sample period ends. Playing the whole
// 64 K PROM, ignoring edges during playback and the silent address 0 are
// this design's choices.
module sound_ctrl #(
  parameter int unsigned CLK_HZ    = 10_000_000,
  parameter int unsigned SAMPLE_HZ = 16_000,
  parameter int unsigned ADDR_W    = 16,
  parameter int unsigned SAMPLES   = 2**ADDR_W
) (
  input  logic              clk,
  input  logic              rst,       // synchronous, active high
  input  logic              go_raw,    // asynchronous packet-received pin
  output logic [ADDR_W-1:0] addr,      // to the sound PROM
  output logic              playing
);

  localparam int unsigned DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned DW  = $clog2(DIV + 1);

  logic          go_meta, go_sync, go_prev;
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    go_meta <= go_raw;
    go_sync <= go_meta;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      go_prev <= 1'b0;
      playing <= 1'b0;
      addr    <= '0;
      div     <= '0;
    end else begin
      go_prev <= go_sync;
      if (!playing) begin
        if (go_sync && !go_prev) begin
          playing <= 1'b1;
          addr    <= '0;
          div     <= '0;
        end
      end else if (div == DW'(DIV - 1)) begin
        div <= '0;
        if (32'(addr) == SAMPLES - 1) begin
          playing <= 1'b0;
          addr    <= '0;
        end else begin
          addr <= addr + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

endmodule
