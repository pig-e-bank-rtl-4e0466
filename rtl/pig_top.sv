// pig_top: core of the electronic piggy-bank chip. Counts deposited coins
// (1, 5, 10, 25 cents and $1) and shows the total as "$dd.dd" under the word
// "Total" on a 16x2 character LCD.
//
// Data path, one coin per clock cycle at most:
//   sensors[2:0] -> coin_mux (6:1 mux of constant BCD coin values)
//                -> bcd_accum (coin register + four BCD digit accumulators)
//                -> four lcd_char_decoder (digit -> '0'..'9')
//                -> lcd_fsm -> rs, db[7:0]
// slowdown divides the clock by 2^COUNT_W to make the LCD strobe lcden and
// the one-cycle step pulse that advances lcd_fsm, so each LCD transfer gets a
// full lcden period. All registers are latch pairs clocked by the two-phase
// non-overlapping clocks ph1/ph2; reset is synchronous and active high.
//
// An immediate assertion flags ph1 and ph2 high together in simulation.
//
// Interface: the sensor code must be 000 when no coin is present and hold a
// coin's code for exactly one cycle per coin (each non-zero cycle adds one
// coin). The LCD latches rs/db on the falling edge of lcden.
// Pads of the 40-pin frame: s2 P15, s1 P14, s0 P13, ph2 P9, ph1 P8,
// en (lcden) P7, rs P6, reset P3, db7..db0 P26..P33; the rest are supplies
// or unused. The carry out of the thousands digit (total wrapping past
// $99.99) has no pin and is left unconnected; the design does not use it.
// Block partition and wiring follow the design; see the module headers for
// the choices made inside each block.
//
// Loop warnings on this module's registers are the expected consequence of
// the latch-pair registers; see flop2ph for why they stand.
module pig_top
  import pig_pkg::*;
#(
  parameter int unsigned COUNT_W = 19
) (
  input  logic       ph1,
  input  logic       ph2,
  input  logic       reset,
  input  logic [2:0] sensors,
  output logic       lcden,
  output logic       rs,
  output logic [7:0] db
);

  bcd4_t     coin;
  bcd4_t     total;
  logic      fsm_en;
  lcd_char_t ones_c, tens_c, hundreds_c, thousands_c;

  slowdown #(.COUNT_W(COUNT_W)) u_slow (
    .ph1   (ph1),
    .ph2   (ph2),
    .reset (reset),
    .lcden (lcden),
    .fsm_en(fsm_en)
  );

  coin_mux #(.WIDTH(16)) u_mux (
    .sensors(sensors),
    .coin   (coin)
  );

  bcd_accum u_sum (
    .ph1     (ph1),
    .ph2     (ph2),
    .reset   (reset),
    .coin    (coin),
    .sum     (total),
    .overflow()
  );

  lcd_char_decoder u_dec_ones      (.digit(total[3:0]),   .char_code(ones_c));
  lcd_char_decoder u_dec_tens      (.digit(total[7:4]),   .char_code(tens_c));
  lcd_char_decoder u_dec_hundreds  (.digit(total[11:8]),  .char_code(hundreds_c));
  lcd_char_decoder u_dec_thousands (.digit(total[15:12]), .char_code(thousands_c));

  // The latch-pair registers need non-overlapping clocks.
  always_comb begin
    assert (!(ph1 && ph2)) else $error("ph1 and ph2 are high at the same time");
  end

  lcd_fsm u_lcd (
    .ph1      (ph1),
    .ph2      (ph2),
    .en       (fsm_en),
    .reset    (reset),
    .ones     (ones_c),
    .tens     (tens_c),
    .hundreds (hundreds_c),
    .thousands(thousands_c),
    .rs       (rs),
    .db       (db)
  );

endmodule
