// tb_lcd_prom: self-checking test of the LCD text PROM. Every byte of the
// map is compared with a reference built here from the eight texts, the
// command bytes and the digit characters.
`timescale 1ns/1ps
module tb_lcd_prom;
  import debra_pkg::*;
  localparam int unsigned ADDR_W = 10;

  logic [ADDR_W-1:0] addr;
  logic [7:0]        data;
  int                checks = 0, failures = 0;

  lcd_prom dut (.addr, .data);

  string texts [8] = '{
    "System Ready", "Press a button to start", "0-60 Acceleration time trial",
    "Braking time trial", "Quarter mile time trial", "Free running time trial",
    "Start Acceleration to start trial", "Start Deceleration to start trial"};

  function automatic logic [7:0] expected(input int a);
    int k, i;
    case (a)
      0:  return 8'hFE;
      5:  return 8'h38;
      6:  return 8'h0C;
      7:  return 8'h01;
      8:  return 8'h80;
      19: return 8'h3A;
      20: return 8'h2E;
      21: return 8'hC0;
      default: ;
    endcase
    if (a >= 9 && a <= 18) return 8'h30 + 8'(a - 9);
    if (a >= 64 && a < 64 + 8 * 64) begin
      k = (a - 64) / 64;
      i = (a - 64) % 64;
      if (i >= 40) return 8'h00;
      if (i >= texts[k].len()) return 8'hFE;
      return (texts[k][i] == " ") ? 8'hFE : texts[k][i];
    end
    return 8'h00;
  endfunction

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++) begin
      addr = ADDR_W'(a);
      #1;
      checks++;
      if (data !== expected(a)) begin
        failures++;
        if (failures < 10) $display("FAIL: address %0d reads %h, expected %h", a, data, expected(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
