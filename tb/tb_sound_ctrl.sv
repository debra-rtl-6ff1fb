// tb_sound_ctrl: self-checking test of the warning-sound player. A small
// instance (CLK_HZ = 64 kHz, 4 clocks per sample, 16 samples) is checked
// address by address; a second instance at the default 10 MHz / 16 kHz is
// checked for its 625-clock sample period.
`timescale 1ns/1ps
module tb_sound_ctrl;
  localparam int unsigned CLK_HZ  = 64_000;
  localparam int unsigned DIV     = 4;
  localparam int unsigned SAMPLES = 16;

  logic        clk = 1'b0, rst, go, go_full;
  logic [15:0] addr, addr_full;
  logic        playing, playing_full;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sound_ctrl #(.CLK_HZ(CLK_HZ), .SAMPLES(SAMPLES)) dut (.clk, .rst, .go_raw(go), .addr, .playing);
  sound_ctrl u_full (.clk, .rst, .go_raw(go_full), .addr(addr_full), .playing(playing_full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Play once, checking every clock; `extra_go` pulses go mid-playback.
  task automatic play(input bit extra_go);
    int n;
    @(negedge clk) go = 1'b1;
    repeat (3) @(negedge clk);
    check(playing && addr == 0, "playing from address 0 three clocks after go");
    go = 1'b0;
    for (int s = 0; s < SAMPLES; s++) begin
      for (int c = 0; c < DIV; c++) begin
        if (!(playing && addr == 16'(s))) begin
          check(1'b0, $sformatf("sample %0d clock %0d: addr %0d playing %0b", s, c, addr, playing));
        end
        if (extra_go && s == 5 && c == 0) go = 1'b1;
        if (extra_go && s == 7 && c == 0) go = 1'b0;
        @(negedge clk);
      end
    end
    check(!playing && addr == 0, "stops after the last sample");
    repeat (20) @(negedge clk);
    check(!playing && addr == 0, "stays quiet");
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    go = 1'b0;
    go_full = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(!playing && addr == 0, "idle after reset");
    play(1'b0);
    play(1'b1);         // a second packet during playback is ignored
    // Default instance: first address step 625 clocks after it starts.
    check(!playing_full, "default instance idle");
    @(negedge clk) go_full = 1'b1;
    n = 0;
    while (!playing_full && n < 10) begin
      @(negedge clk);
      n++;
    end
    check(n == 3, $sformatf("default instance starts %0d clocks after go", n));
    n = 0;
    while (addr_full == 0 && n < 2000) begin
      @(negedge clk);
      n++;
    end
    check(n == 625, $sformatf("default sample period %0d clocks, expected 625", n));
    n = 0;
    while (addr_full == 1 && n < 2000) begin
      @(negedge clk);
      n++;
    end
    check(n == 625 && addr_full == 2, $sformatf("second sample lasted %0d clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
