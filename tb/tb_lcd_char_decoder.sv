// tb_lcd_char_decoder: exhaustive self-checking test of the digit-to-character
// decoder: digits 0..9 must give the ASCII numerals, 10..15 the blank 0xFE.
module tb_lcd_char_decoder;
  logic [3:0] digit;
  logic [7:0] char_code;
  int checks = 0, failures = 0;

  lcd_char_decoder dut (.digit(digit), .char_code(char_code));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned expected;
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      expected = (d < 10) ? 8'("0") + 8'(d) : 8'hFE;
      checks++;
      if (char_code !== expected) begin
        failures++;
        $display("FAIL digit=%0d char=%h expected=%h", d, char_code, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
