// lcd_ctrl: keeps the dashboard LCD (HD44780 type, 2 lines of 40
// characters, 8-bit bus) showing the selected trial and its result.
//
// The controller never produces character codes itself. It puts an address
// on the text PROM, whose data pins drive the LCD's data pins, sets RS
// (0: command, 1: character), waits SETUP_US (42 us) with everything
// steady, and then pulses E for EN_US. Each byte is therefore one address,
// and a 40-character line is a run of 40 consecutive addresses.
//
// Sequence: after reset it waits POWERUP_US, sends the three set-up
// commands (8-bit bus/2 lines, display on, clear) and waits CLEAR_US after
// the clear. It then repaints the display for ever, one frame after
// another:
//   cursor to line 1, 40 characters of the title of the current mode,
//   cursor to line 2, 40 characters of either an instruction message or
//   the stopwatch time "dd.d" followed by blanks.
// Line 2 shows "Press a button to start" in the ready mode, the "Start
// Acceleration/Deceleration to start trial" message while a trial waits for
// its trigger, and the time while it runs or after it has finished (the
// free-running watch always shows the time). Mode, status and time are
// sampled at the start of each frame, so a frame never mixes two states.
// Each byte takes one clock to present its address, SETUP_US of hold and
// EN_US of enable; one frame is 82 bytes, about 3.5 ms at the default timing.
//
// `frame_done` pulses for one clock at the end of each frame. The 42 us
// hold and the use of the PROM follow the source design; the continuous
// repaint, the frame layout, the E pulse width and the power-up and clear
// waits are this design's choices.
module lcd_ctrl
  import debra_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 10_000_000,
  parameter int unsigned SETUP_US   = 42,
  parameter int unsigned EN_US      = 1,
  parameter int unsigned CLEAR_US   = 2000,
  parameter int unsigned POWERUP_US = 15000,
  parameter int unsigned ADDR_W     = 10
) (
  input  logic              clk,
  input  logic              rst,          // synchronous, active high
  input  mode_e             mode,
  input  status_e           status,
  input  bcd3_t             bcd,
  output logic [ADDR_W-1:0] prom_addr,
  output logic              lcd_rs,
  output logic              lcd_en,
  output logic              frame_done
);

  localparam int unsigned SETUP_CYC = us_to_cycles(CLK_HZ, SETUP_US);
  localparam int unsigned EN_CYC    = us_to_cycles(CLK_HZ, EN_US);
  localparam int unsigned CLEAR_CYC = us_to_cycles(CLK_HZ, CLEAR_US);
  localparam int unsigned PWR_CYC   = us_to_cycles(CLK_HZ, POWERUP_US);
  localparam int unsigned DW        = $clog2(PWR_CYC + CLEAR_CYC + SETUP_CYC + 1);
  localparam int unsigned FRAME_LEN = 2 * (LCD_MSG_LEN + 1);   // 82 bytes

  typedef enum logic [1:0] {P_WAIT, P_SETUP, P_ENABLE} phase_e;

  phase_e        phase;
  logic [DW-1:0] delay;
  logic          init;          // still sending the set-up commands
  logic [6:0]    idx;           // byte within the set-up or the frame
  mode_e         f_mode;        // state sampled for this frame
  status_e       f_status;
  bcd3_t         f_bcd;

  // ---------------------------------------------------------------- bytes
  function automatic int unsigned title_msg(input mode_e m);
    case (m)
      MODE_SIXTY:   return 2;
      MODE_BRAKE:   return 3;
      MODE_QUARTER: return 4;
      MODE_FREERUN: return 5;
      default:      return 0;
    endcase
  endfunction

  logic               show_time;
  int unsigned        line2_msg;
  logic [ADDR_W-1:0]  addr_next;
  logic               rs_next;
  int unsigned        pos;

  always_comb begin
    show_time = 1'b0;
    line2_msg = 1;
    if (f_mode == MODE_READY)          line2_msg = 1;
    else if (f_status != ST_WAIT || f_mode == MODE_FREERUN) show_time = 1'b1;
    else if (f_mode == MODE_BRAKE)     line2_msg = 7;
    else                               line2_msg = 6;

    rs_next   = 1'b1;
    pos       = 0;
    addr_next = ADDR_W'(LCD_A_BLANK);
    if (init) begin
      rs_next   = 1'b0;
      addr_next = ADDR_W'(LCD_A_INIT + 32'(idx));
    end else if (idx == 0) begin
      rs_next   = 1'b0;
      addr_next = ADDR_W'(LCD_A_LINE1);
    end else if (idx <= 7'(LCD_MSG_LEN)) begin
      pos       = 32'(idx) - 1;
      addr_next = ADDR_W'(LCD_A_MSG + LCD_MSG_SLOT * title_msg(f_mode) + pos);
    end else if (idx == 7'(LCD_MSG_LEN + 1)) begin
      rs_next   = 1'b0;
      addr_next = ADDR_W'(LCD_A_LINE2);
    end else begin
      pos = 32'(idx) - (LCD_MSG_LEN + 2);
      if (!show_time)
        addr_next = ADDR_W'(LCD_A_MSG + LCD_MSG_SLOT * line2_msg + pos);
      else
        case (pos)
          0: addr_next = (f_bcd[2] == 4'd0) ? ADDR_W'(LCD_A_BLANK)
                                            : ADDR_W'(LCD_A_DIGIT0 + 32'(f_bcd[2]));
          1: addr_next = ADDR_W'(LCD_A_DIGIT0 + 32'(f_bcd[1]));
          2: addr_next = ADDR_W'(LCD_A_DOT);
          3: addr_next = ADDR_W'(LCD_A_DIGIT0 + 32'(f_bcd[0]));
          default: addr_next = ADDR_W'(LCD_A_BLANK);
        endcase
    end
  end

  // ---------------------------------------------------------------- timing
  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= P_WAIT;
      delay      <= DW'(PWR_CYC);
      init       <= 1'b1;
      idx        <= '0;
      prom_addr  <= '0;
      lcd_rs     <= 1'b0;
      lcd_en     <= 1'b0;
      frame_done <= 1'b0;
      f_mode     <= MODE_READY;
      f_status   <= ST_WAIT;
      f_bcd      <= '0;
    end else begin
      frame_done <= 1'b0;
      if (!init && idx == 0 && phase == P_WAIT && delay == '0) begin
        f_mode   <= mode;
        f_status <= status;
        f_bcd    <= bcd;
      end
      unique case (phase)
        P_WAIT: begin
          if (delay != '0) begin
            delay <= delay - 1'b1;
          end else begin
            // Present the next byte and hold it steady.
            phase     <= P_SETUP;
            delay     <= DW'(SETUP_CYC - 1);
            prom_addr <= addr_next;
            lcd_rs    <= rs_next;
          end
        end
        P_SETUP: begin
          if (delay != '0) begin
            delay <= delay - 1'b1;
          end else begin
            phase  <= P_ENABLE;
            delay  <= DW'(EN_CYC - 1);
            lcd_en <= 1'b1;
          end
        end
        P_ENABLE: begin
          if (delay != '0) begin
            delay <= delay - 1'b1;
          end else begin
            lcd_en <= 1'b0;
            phase  <= P_WAIT;
            delay  <= '0;
            if (init) begin
              if (idx == 7'd2) begin
                init  <= 1'b0;
                idx   <= '0;
                delay <= DW'(CLEAR_CYC);
              end else begin
                idx <= idx + 1'b1;
              end
            end else if (idx == 7'(FRAME_LEN - 1)) begin
              idx        <= '0;
              frame_done <= 1'b1;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        default: phase <= P_WAIT;
      endcase
    end
  end

endmodule
