// tb_bcd_accum: self-checking test of the summing module.
// Two-phase clock ph1/ph2 (period 10); inputs change and outputs are checked
// at the falling edge of ph1. Checks:
//  - latency: a single penny after reset appears in the total two cycles later;
//  - bursts of random coins (including coins on consecutive cycles), each
//    followed by four idle cycles, after which the BCD total must equal the
//    integer sum of the coins modulo 10000 cents;
//  - one overflow pulse per wrap past 9999 cents, counted against the model;
//  - synchronous reset clears the total.
module tb_bcd_accum;
  logic        ph1 = 1'b0, ph2 = 1'b0;
  logic        reset;
  logic [15:0] coin, sum;
  logic        overflow;
  int checks = 0, failures = 0, cycles = 0;
  int overflow_pulses = 0;

  bcd_accum dut (.ph1(ph1), .ph2(ph2), .reset(reset), .coin(coin), .sum(sum), .overflow(overflow));

  always begin
    #1 ph1 = 1'b1;
    #4 ph1 = 1'b0;
    #1 ph2 = 1'b1;
    #4 ph2 = 1'b0;
    cycles++;
  end

  always @(negedge ph1) if (!reset && overflow) overflow_pulses++;

  function automatic logic [15:0] to_bcd(int cents);
    return 16'((cents / 1000 % 10) << 12 | (cents / 100 % 10) << 8 |
               (cents / 10 % 10) << 4 | (cents % 10));
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d: sum=%h", what, cycles, sum);
    end
  endtask

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, burst, pick;
    static int cents[6] = '{0, 1, 5, 10, 25, 100};
    reset = 1'b1; coin = 16'h0;
    repeat (3) @(negedge ph1);
    reset = 1'b0;
    coin = 16'h0001;                 // one penny
    @(negedge ph1); coin = 16'h0;
    check("penny not yet visible after one cycle", sum == 16'h0000);
    @(negedge ph1);
    check("penny visible after two cycles", sum == 16'h0001);
    total = 1;
    for (int b = 0; b < 400; b++) begin
      burst = $urandom_range(1, 12);
      for (int k = 0; k < burst; k++) begin
        pick = $urandom_range(0, 5);
        coin = to_bcd(cents[pick]);
        total += cents[pick];
        @(negedge ph1);
      end
      coin = 16'h0;
      repeat (4) @(negedge ph1);
      check("settled total", sum == to_bcd(total % 10000));
      check("overflow count", overflow_pulses == total / 10000);
    end
    check("at least two wraps exercised", total / 10000 >= 2);
    reset = 1'b1;
    @(negedge ph1);
    reset = 1'b0;
    check("reset clears total", sum == 16'h0000);
    $display("total cents %0d, overflow pulses %0d", total, overflow_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
