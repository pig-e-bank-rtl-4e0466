// tb_slowdown: self-checking test of the slow-clock generator.
// A small instance (COUNT_W = 5) is compared cycle by cycle with a reference
// counter: lcden = bit 4 of (count + 1), fsm_en = (count + 1 == 8). A second
// instance at the default width (19 bits) is checked for its timing after
// reset: first step pulse after 2^17 - 1 cycles, lcden rising after
// 2^18 - 1 cycles, and a step-pulse period of 2^19 cycles.
module tb_slowdown;
  logic ph1 = 1'b0, ph2 = 1'b0;
  logic reset;
  logic lcden_s, en_s, lcden_d, en_d;
  int checks = 0, failures = 0, cycles = 0;

  slowdown #(.COUNT_W(5)) dut_small (.ph1(ph1), .ph2(ph2), .reset(reset), .lcden(lcden_s), .fsm_en(en_s));
  slowdown dut_full (.ph1(ph1), .ph2(ph2), .reset(reset), .lcden(lcden_d), .fsm_en(en_d));

  always begin
    #1 ph1 = 1'b1;
    #4 ph1 = 1'b0;
    #1 ph2 = 1'b1;
    #4 ph2 = 1'b0;
    cycles++;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    wait (cycles == 1200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, first_en, second_en, first_rise;
    logic last_lcden;
    reset = 1'b1;
    repeat (3) @(negedge ph1);
    reset = 1'b0;
    first_en = -1; second_en = -1; first_rise = -1;
    last_lcden = 1'b0;
    n = 1;                       // count is 0 after reset, so count + 1 = 1
    for (int t = 0; t < 700000; t++) begin
      if (t < 200) begin
        check("small lcden", lcden_s == ((n >> 4) & 1));
        check("small fsm_en", en_s == ((n % 32) == 8));
      end
      if (en_d && first_en < 0) first_en = t;
      else if (en_d && second_en < 0) second_en = t;
      if (lcden_d && !last_lcden && first_rise < 0) first_rise = t;
      last_lcden = lcden_d;
      n++;
      @(negedge ph1);
    end
    check("first full-size step pulse at 2^17 - 1", first_en == (1 << 17) - 1);
    check("full-size step period 2^19", second_en - first_en == (1 << 19));
    check("full-size lcden rises at 2^18 - 1", first_rise == (1 << 18) - 1);
    $display("first_en=%0d second_en=%0d first_rise=%0d", first_en, second_en, first_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
