// pig_pkg: types and constants shared by the electronic piggy-bank coin counter.
//
// Holds the 3-bit coin sensor codes, the BCD value of each coin, the LCD
// controller state encoding and the HD44780-style LCD command and character
// codes the controller sends. The sensor codes, coin values, state numbers and
// LCD byte values are the ones the design was specified with; the names are
// this implementation's.
package pig_pkg;

  // One BCD digit and a four-digit BCD amount ($dd.dd, thousands..ones).
  typedef logic [3:0]  bcd_t;
  typedef logic [15:0] bcd4_t;
  typedef logic [7:0]  lcd_char_t;

  // Sensor codes (000 = no coin). 110 and 111 are unused.
  localparam logic [2:0] SNS_NONE    = 3'b000;
  localparam logic [2:0] SNS_PENNY   = 3'b001;
  localparam logic [2:0] SNS_NICKEL  = 3'b010;
  localparam logic [2:0] SNS_DIME    = 3'b011;
  localparam logic [2:0] SNS_QUARTER = 3'b100;
  localparam logic [2:0] SNS_DOLLAR  = 3'b101;

  // BCD value of each coin in cents.
  localparam bcd4_t COIN_NONE    = 16'h0000;
  localparam bcd4_t COIN_PENNY   = 16'h0001;
  localparam bcd4_t COIN_NICKEL  = 16'h0005;
  localparam bcd4_t COIN_DIME    = 16'h0010;
  localparam bcd4_t COIN_QUARTER = 16'h0025;
  localparam bcd4_t COIN_DOLLAR  = 16'h0100;

  // LCD controller states. 0 is the post-reset idle state; 8 is unused.
  typedef enum logic [3:0] {
    ST_IDLE      = 4'd0,
    ST_SETLENGTH = 4'd1,
    ST_SETLINES  = 4'd2,
    ST_SETFONT   = 4'd3,
    ST_SETBLINKY = 4'd4,
    ST_LCDOFF    = 4'd5,
    ST_CLEARLCD  = 4'd6,
    ST_ENTRYMODE = 4'd7,
    ST_WRITEMSG1 = 4'd9,
    ST_CURSOR2   = 4'd10,
    ST_WRITEMSG2 = 4'd11
  } lcd_state_t;

  // LCD command bytes (rs = 0).
  localparam lcd_char_t CMD_FUNCSET = 8'b0011_1100;  // 8-bit bus, 2 lines, 5x10 font
  localparam lcd_char_t CMD_DISPOFF = 8'b0000_1000;  // display off
  localparam lcd_char_t CMD_CLEAR   = 8'b0000_0001;  // clear display, home
  localparam lcd_char_t CMD_DISPON  = 8'b0000_1100;  // display on, cursor off
  localparam lcd_char_t CMD_LINE2   = 8'b1100_0000;  // DDRAM address 0x40: row 2, column 0

  // LCD character bytes (rs = 1).
  localparam lcd_char_t CHAR_BLANK  = 8'b1111_1110;  // blank; also marks the end of a message
  localparam lcd_char_t CHAR_DOLLAR = 8'h24;         // '$'
  localparam lcd_char_t CHAR_POINT  = 8'h2E;         // '.'
  localparam lcd_char_t CHAR_ZERO   = 8'h30;         // '0'

endpackage
