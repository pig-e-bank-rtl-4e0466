// slowdown: generates the slow LCD enable strobe and the LCD controller's step
// pulse from the fast two-phase clock.
//
// A COUNT_W-bit counter (flop2ph) increments every cycle. With n = count + 1:
//   lcden  = n[COUNT_W-1]          square wave, period 2^COUNT_W cycles
//   fsm_en = (n == 2^(COUNT_W-2))  one-cycle pulse, once per period
// The pulse falls in the middle of the low half of lcden, so the controller
// changes rs/db a quarter period before lcden rises and leaves them stable
// through the whole high phase and the falling edge, where the LCD latches
// them. Reset is synchronous and clears the counter (lcden low). The counter
// width (19 bits) and both output equations follow the design.
//
// Loop warnings on this module's registers are the expected consequence of
// the latch-pair registers; see flop2ph for why they stand.
module slowdown #(
  parameter int unsigned COUNT_W = 19
) (
  input  logic ph1,
  input  logic ph2,
  input  logic reset,
  output logic lcden,
  output logic fsm_en
);

  localparam logic [COUNT_W-1:0] STEP_AT = COUNT_W'(1) << (COUNT_W - 2);

  logic [COUNT_W-1:0] count;
  logic [COUNT_W-1:0] count_next;

  assign count_next = count + 1'b1;

  flop2ph #(.WIDTH(COUNT_W)) u_count (
    .ph1  (ph1),
    .ph2  (ph2),
    .reset(reset),
    .en   (1'b1),
    .d    (count_next),
    .q    (count)
  );

  assign lcden  = count_next[COUNT_W-1];
  assign fsm_en = (count_next == STEP_AT);

endmodule
