// lcd_prom: the byte-wide text PROM that sits between the FPGA and the LCD.
//
// The FPGA only drives the PROM address (plus the LCD's RS and E lines); the
// PROM's data pins drive the LCD's data pins directly. Writing a 40-character
// line is then a matter of stepping through 40 consecutive addresses instead
// of decoding 40 characters in a state machine. Read is asynchronous, like
// the flash part it stands for.
//
// Map (byte addresses):
//   0x00        0xFE, the blank character (the LCD's character ROM shows
//               0xFE as a blank; it also separates words in the texts)
//   0x05..0x08  LCD commands 0x38 (8-bit bus, 2 lines), 0x0C (display on,
//               no cursor), 0x01 (clear), 0x80 (cursor to line 1)
//   0x09..0x12  the digits '0'..'9'
//   0x13, 0x14  ':' and '.'
//   0x15        LCD command 0xC0 (cursor to line 2)
//   0x40 + 64*k message k, MSG_LEN (40) characters padded with blanks:
//     0 "System Ready"                       4 "Quarter mile time trial"
//     1 "Press a button to start"            5 "Free running time trial"
//     2 "0-60 Acceleration time trial"       6 "Start Acceleration to start trial"
//     3 "Braking time trial"                 7 "Start Deceleration to start trial"
// Unused addresses read 0x00. The command bytes, digits and the eight texts
// follow the source design; the fixed 64-byte message slots and the 0xC0
// command are this design's layout.
module lcd_prom
  import debra_pkg::*;
#(
  parameter int unsigned ADDR_W  = 10,
  parameter int unsigned MSG_LEN = LCD_MSG_LEN
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data
);

  localparam logic [7:0] BLANK = 8'hFE;

  // Message k as a right-justified string literal.
  function automatic logic [8*MSG_LEN-1:0] message(input int unsigned k);
    case (k)
      0:       return "System Ready";
      1:       return "Press a button to start";
      2:       return "0-60 Acceleration time trial";
      3:       return "Braking time trial";
      4:       return "Quarter mile time trial";
      5:       return "Free running time trial";
      6:       return "Start Acceleration to start trial";
      default: return "Start Deceleration to start trial";
    endcase
  endfunction

  // Character i of message k, spaces and padding shown as the blank.
  function automatic logic [7:0] message_char(input int unsigned k, input int unsigned i);
    logic [8*MSG_LEN-1:0] m;
    int unsigned lead;
    logic [7:0] c;
    m    = message(k);
    lead = 0;
    for (int unsigned j = 0; j < MSG_LEN; j++)
      if (m[8*(MSG_LEN-1-j) +: 8] == 8'h00 && lead == j) lead = j + 1;
    if (lead + i >= MSG_LEN) return BLANK;
    c = m[8*(MSG_LEN-1-lead-i) +: 8];
    return (c == " ") ? BLANK : c;
  endfunction

  function automatic logic [7:0] rom_byte(input int unsigned a);
    if (a == LCD_A_BLANK)       return BLANK;
    if (a == LCD_A_INIT)        return 8'h38;
    if (a == LCD_A_INIT + 1)    return 8'h0C;
    if (a == LCD_A_INIT + 2)    return 8'h01;
    if (a == LCD_A_LINE1)       return 8'h80;
    if (a >= LCD_A_DIGIT0 && a <= LCD_A_DIGIT0 + 9)
      return 8'h30 + 8'(a - LCD_A_DIGIT0);
    if (a == LCD_A_DOT - 1)     return ":";
    if (a == LCD_A_DOT)         return ".";
    if (a == LCD_A_LINE2)       return 8'hC0;
    if (a >= LCD_A_MSG && a < LCD_A_MSG + LCD_NUM_MSG * LCD_MSG_SLOT
        && ((a - LCD_A_MSG) % LCD_MSG_SLOT) < MSG_LEN)
      return message_char((a - LCD_A_MSG) / LCD_MSG_SLOT, (a - LCD_A_MSG) % LCD_MSG_SLOT);
    return 8'h00;
  endfunction

  typedef logic [7:0] rom_t [2**ADDR_W];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned a = 0; a < 2**ADDR_W; a++) r[a] = rom_byte(a);
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];

endmodule
