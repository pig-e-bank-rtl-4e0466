// bcd_digit_adder: one decimal digit of the running-total accumulator.
//
// Each cycle the held digit y is replaced by the decimal sum y + a + cin. The
// binary sum (at most 9 + 9 + 1 = 19) is corrected by adding 6 when it exceeds
// 9; the low four bits of the corrected sum become the new digit and bit 4 the
// decimal carry. Both the digit and the carry are registered (flop2ph), so the
// carry reaches the next digit one cycle later. Inputs: a must be a valid BCD
// digit. Timing: y and cout change once per ph1/ph2 cycle; synchronous reset
// clears both. The add-6 correction and the registered carry follow the
// design's reference model.
//
// Loop warnings on this module's registers are the expected consequence of
// the latch-pair registers; see flop2ph for why they stand.
module bcd_digit_adder
  import pig_pkg::*;
(
  input  logic ph1,
  input  logic ph2,
  input  logic reset,
  input  bcd_t a,
  input  logic cin,
  output logic cout,
  output bcd_t y
);

  logic [4:0] binsum;
  logic [4:0] corrected;

  always_comb begin
    binsum = 5'(y) + 5'(a) + 5'(cin);
    if (binsum > 5'd9) corrected = binsum + 5'd6;
    else               corrected = binsum;
  end

  flop2ph #(.WIDTH(5)) u_reg (
    .ph1  (ph1),
    .ph2  (ph2),
    .reset(reset),
    .en   (1'b1),
    .d    (corrected),
    .q    ({cout, y})
  );

endmodule
