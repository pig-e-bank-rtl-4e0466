// bcd_accum: the summing module. Keeps the running total of deposited money
// as four BCD digits ($dd.dd).
//
// The 16-bit BCD coin value from the coin mux is first registered, then added
// digit by digit by four bcd_digit_adder instances. Each digit's registered
// carry feeds the next digit, so a carry ripples one digit per cycle; the
// total is exact three cycles after the coin input last changed, and carries
// already in flight are never lost, so coins may arrive every cycle. The carry
// out of the thousands digit is the overflow output: a one-cycle pulse each
// time the total passes $99.99 and wraps. Latency: a coin applied for one
// cycle shows in the ones/tens digits two cycles later. Reset is synchronous
// and clears the coin register, the total and all carries.
// The four chained digit adders with registered carries and the coin register
// follow the design's reference model; placing the coin register here, on the
// synthesized side of the custom datapath, is this implementation's choice.
//
// Loop warnings on this module's registers are the expected consequence of
// the latch-pair registers; see flop2ph for why they stand.
module bcd_accum
  import pig_pkg::*;
(
  input  logic  ph1,
  input  logic  ph2,
  input  logic  reset,
  input  bcd4_t coin,
  output bcd4_t sum,
  output logic  overflow
);

  bcd4_t      coin_q;
  logic [4:0] carry;   // carry[0] = 0, carry[i+1] = registered carry out of digit i

  flop2ph #(.WIDTH(16)) u_coin_reg (
    .ph1  (ph1),
    .ph2  (ph2),
    .reset(reset),
    .en   (1'b1),
    .d    (coin),
    .q    (coin_q)
  );

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < 4; i++) begin : g_digit
    bcd_digit_adder u_digit (
      .ph1  (ph1),
      .ph2  (ph2),
      .reset(reset),
      .a    (coin_q[4*i +: 4]),
      .cin  (carry[i]),
      .cout (carry[i+1]),
      .y    (sum[4*i +: 4])
    );
  end

  assign overflow = carry[4];

endmodule
