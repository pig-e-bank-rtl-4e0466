// tb_bcd_digit_adder: self-checking test of one BCD digit accumulator.
// Two-phase clock ph1/ph2 (period 10). Inputs are changed and outputs checked
// at the falling edge of ph1, after the registers have updated, so each
// applied (a, cin) must show in y/cout exactly one cycle later. The reference
// is integer decimal arithmetic: s = y + a + cin, y' = s mod 10, cout = s >= 10.
// Random digits, forced worst cases (9 + 9 + 1) and a mid-run reset are used.
module tb_bcd_digit_adder;
  logic       ph1 = 1'b0, ph2 = 1'b0;
  logic       reset;
  logic [3:0] a, y;
  logic       cin, cout;
  int checks = 0, failures = 0, cycles = 0;

  bcd_digit_adder dut (.ph1(ph1), .ph2(ph2), .reset(reset), .a(a), .cin(cin), .cout(cout), .y(y));

  always begin
    #1 ph1 = 1'b1;
    #4 ph1 = 1'b0;
    #1 ph2 = 1'b1;
    #4 ph2 = 1'b0;
    cycles++;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_y, exp_c, s;
    reset = 1'b1; a = 4'd0; cin = 1'b0;
    repeat (3) @(negedge ph1);
    exp_y = 0; exp_c = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge ph1);
      checks++;
      if (y !== 4'(exp_y) || cout !== 1'(exp_c)) begin
        failures++;
        $display("FAIL cycle %0d: y=%0d cout=%b expected y=%0d cout=%0d", i, y, cout, exp_y, exp_c);
      end
      reset = (i == 1500);
      if (i % 97 == 5) begin
        a = 4'd9; cin = 1'b1;
      end else begin
        a = 4'($urandom_range(0, 9)); cin = 1'($urandom_range(0, 1));
      end
      if (reset) begin
        exp_y = 0; exp_c = 0;
      end else begin
        s = exp_y + int'(a) + int'(cin);
        exp_y = s % 10;
        exp_c = (s >= 10) ? 1 : 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
