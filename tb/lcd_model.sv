// lcd_model: behavioural model of a 16x2 HD44780-compatible character LCD,
// reduced to what the piggy-bank controller uses. Not synthesizable logic; for
// testbenches only.
//
// rs/db are latched on the falling edge of e. With rs = 1 the byte is written
// to display RAM at the current address, which then increments. With rs = 0:
// 0x01 clears the display (fills it with 0x20) and homes the address;
// 1xxxxxxx sets the address (row 1 starts at 0x00, row 2 at 0x40);
// 00001dcb sets display on/off (d); 001xxxxx is a function set. Other codes
// (including 0x00) are counted but do nothing. Counters let a testbench see
// which operations took place.
module lcd_model (
  input logic       rs,
  input logic       e,
  input logic [7:0] db
);
  logic [7:0] ddram [0:127];
  logic [6:0] addr = 7'd0;
  logic       display_on = 1'b0;
  int funcset_count = 0, clear_count = 0, dispon_count = 0, dispoff_count = 0;
  int line2_count = 0, data_count = 0, other_count = 0;

  initial for (int i = 0; i < 128; i++) ddram[i] = 8'h20;

  always @(negedge e) begin
    if (rs) begin
      ddram[addr] <= db;
      addr <= addr + 7'd1;
      data_count <= data_count + 1;
    end else if (db == 8'h01) begin
      for (int i = 0; i < 128; i++) ddram[i] <= 8'h20;
      addr <= 7'd0;
      clear_count <= clear_count + 1;
    end else if (db[7]) begin
      addr <= db[6:0];
      if (db[6:0] == 7'h40) line2_count <= line2_count + 1;
    end else if (db[7:3] == 5'b00001) begin
      display_on <= db[2];
      if (db[2]) dispon_count <= dispon_count + 1;
      else       dispoff_count <= dispoff_count + 1;
    end else if (db[7:5] == 3'b001) begin
      funcset_count <= funcset_count + 1;
    end else begin
      other_count <= other_count + 1;
    end
  end

  // Character at a row (0 or 1) and column.
  function automatic logic [7:0] char_at(int row, int col);
    return ddram[7'(row * 64 + col)];
  endfunction
endmodule
