// lcd_char_decoder: converts one BCD digit into the LCD character code of its
// numeral. Digits 0..9 give 0x30..0x39 ('0'..'9'); the unused codes 10..15
// give 0xFE, the blank character. Purely combinational. The mapping follows
// the design.
module lcd_char_decoder
  import pig_pkg::*;
(
  input  bcd_t      digit,
  output lcd_char_t char_code
);

  always_comb begin
    if (digit <= 4'd9) char_code = CHAR_ZERO | {4'b0000, digit};
    else               char_code = CHAR_BLANK;
  end

endmodule
