// lcd_fsm: controller that initialises a 16x2 HD44780-style character LCD and
// keeps the running total on it.
//
// One LCD transfer per step: the state and a row (character index) register
// advance only when en (the step pulse from slowdown) is high, and rs/db are a
// combinational function of the state, so they stay put between steps.
// Sequence after reset:
//   idle (rs=0, db=00)
//   setlength, setlines, setfont, setblinky  function set 0x3C, four times
//   lcdoff 0x08, clearlcd 0x01, entrymode 0x0C (display on, cursor off)
//   writemsg1: rs=1, sends "Total" then the blank 0xFE, one character per step
//   cursor2:   0xC0, cursor to row 2 column 0
//   writemsg2: rs=1, sends '$', ten-dollars, dollars, '.', dimes, cents, 0xFE
//   then back to cursor2, so row 2 is rewritten continuously and follows the
//   total. A message ends on the step that sends 0xFE; the row index then
//   returns to 0. The digit inputs are character codes (lcd_char_decoder).
// State names, encodings, command bytes, messages and transitions follow the
// design; the idle-state outputs and the 3-bit row counter are this
// implementation's choices.
//
// Loop warnings on this module's registers are the expected consequence of
// the latch-pair registers; see flop2ph for why they stand.
module lcd_fsm
  import pig_pkg::*;
(
  input  logic      ph1,
  input  logic      ph2,
  input  logic      en,
  input  logic      reset,
  input  lcd_char_t ones,
  input  lcd_char_t tens,
  input  lcd_char_t hundreds,
  input  lcd_char_t thousands,
  output logic      rs,
  output lcd_char_t db
);

  lcd_state_t state, next_state;
  logic [3:0] state_bits;
  logic [2:0] row, next_row;
  lcd_char_t  msg1_char, msg2_char;

  flop2ph #(.WIDTH(4)) u_state_reg (
    .ph1  (ph1),
    .ph2  (ph2),
    .reset(reset),
    .en   (en),
    .d    (next_state),
    .q    (state_bits)
  );

  assign state = lcd_state_t'(state_bits);

  flop2ph #(.WIDTH(3)) u_row_reg (
    .ph1  (ph1),
    .ph2  (ph2),
    .reset(reset),
    .en   (en),
    .d    (next_row),
    .q    (row)
  );

  // Row 1 text: "Total" followed by the end-of-message blank.
  always_comb begin
    unique case (row)
      3'd0:    msg1_char = 8'h54;  // 'T'
      3'd1:    msg1_char = 8'h6F;  // 'o'
      3'd2:    msg1_char = 8'h74;  // 't'
      3'd3:    msg1_char = 8'h61;  // 'a'
      3'd4:    msg1_char = 8'h6C;  // 'l'
      default: msg1_char = CHAR_BLANK;
    endcase
  end

  // Row 2 text: "$dd.dd" followed by the end-of-message blank.
  always_comb begin
    unique case (row)
      3'd0:    msg2_char = CHAR_DOLLAR;
      3'd1:    msg2_char = thousands;
      3'd2:    msg2_char = hundreds;
      3'd3:    msg2_char = CHAR_POINT;
      3'd4:    msg2_char = tens;
      3'd5:    msg2_char = ones;
      default: msg2_char = CHAR_BLANK;
    endcase
  end

  always_comb begin
    rs         = 1'b0;
    db         = 8'h00;
    next_state = state;
    next_row   = 3'd0;
    unique case (state)
      ST_IDLE:      begin db = 8'h00;       next_state = ST_SETLENGTH; end
      ST_SETLENGTH: begin db = CMD_FUNCSET; next_state = ST_SETLINES;  end
      ST_SETLINES:  begin db = CMD_FUNCSET; next_state = ST_SETFONT;   end
      ST_SETFONT:   begin db = CMD_FUNCSET; next_state = ST_SETBLINKY; end
      ST_SETBLINKY: begin db = CMD_FUNCSET; next_state = ST_LCDOFF;    end
      ST_LCDOFF:    begin db = CMD_DISPOFF; next_state = ST_CLEARLCD;  end
      ST_CLEARLCD:  begin db = CMD_CLEAR;   next_state = ST_ENTRYMODE; end
      ST_ENTRYMODE: begin db = CMD_DISPON;  next_state = ST_WRITEMSG1; end
      ST_WRITEMSG1: begin
        rs = 1'b1;
        db = msg1_char;
        if (msg1_char == CHAR_BLANK) next_state = ST_CURSOR2;
        else                         next_row   = row + 3'd1;
      end
      ST_CURSOR2:   begin db = CMD_LINE2;   next_state = ST_WRITEMSG2; end
      ST_WRITEMSG2: begin
        rs = 1'b1;
        db = msg2_char;
        if (msg2_char == CHAR_BLANK) next_state = ST_CURSOR2;
        else                         next_row   = row + 3'd1;
      end
      default:      begin db = 8'h00;       next_state = ST_SETLENGTH; end
    endcase
  end

endmodule
