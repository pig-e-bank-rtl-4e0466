// flop2ph: resettable, enabled register for two-phase non-overlapping clocking.
//
// Every register of the chip is a master-slave pair of level-sensitive latches:
// the master is transparent while ph2 is high, the slave while ph1 is high. The
// next value is chosen in front of the master: the reset value (all zeros) when
// reset is high, d when en is high, otherwise the held value. With
// non-overlapping ph1/ph2 this behaves like an edge-triggered flip-flop whose
// output changes while ph1 is high, from the value d had at the end of the
// preceding ph2 pulse. Reset is therefore synchronous and takes one full
// ph2-then-ph1 cycle. The latch pair and the reset/enable multiplexer follow
// the design's register style; folding reset and enable into one module is
// this implementation's choice. The latches are intentional.
//
// Loop warnings: a lint tool that treats latches as combinational logic
// reports a combinational loop through every register whose next value
// depends on its own output (counters, accumulators, state machines), along
// q -> logic -> master latch -> slave latch -> q. The loop stands on purpose:
// ph1 and ph2 must never be high at the same time, so the master and slave are
// never transparent together and the path is always cut by a closed latch.
module flop2ph #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             ph1,
  input  logic             ph2,
  input  logic             reset,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d_next;
  logic [WIDTH-1:0] mid;

  always_comb begin
    if (reset)   d_next = '0;
    else if (en) d_next = d;
    else         d_next = q;
  end

  // master latch, open during ph2
  always_latch begin
    if (ph2) mid = d_next;
  end

  // slave latch, open during ph1
  always_latch begin
    if (ph1) q = mid;
  end

endmodule
