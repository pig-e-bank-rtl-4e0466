// tb_pig_top: end-to-end self-checking test of the piggy-bank chip core with
// a behavioural LCD attached.
//
// The slow-clock divider is shortened (COUNT_W = 6, one LCD transfer every 64
// cycles) so that many display refreshes fit in the run. The test deposits
// bursts of random coins (one-cycle sensor pulses, sometimes on consecutive
// cycles, weighted towards dollars so the total wraps past $99.99), waits for
// two complete rewrites of row 2, and compares the LCD contents with the
// expected text: row 1 "Total" followed by the 0xFE blank, row 2 "$dd.dd" with
// the deposited amount modulo $100.00. A reset in the middle of the run must
// bring the display back to "$00.00".
// Each mechanism of the design is counted and must occur at least once: every
// coin type, back-to-back coins, a decimal carry into each higher digit, a
// wrap of the total (carries and wraps are counted on the reference total;
// the display check shows the design handled them), the LCD initialisation (4 function sets, display off,
// clear, display on), the row-2 cursor move/refresh loop, and a reset.
module tb_pig_top;
  localparam int COUNT_W = 6;
  localparam int STEP_CYCLES = 1 << COUNT_W;
  localparam int REFRESH_CYCLES = 8 * STEP_CYCLES;   // cursor2 + 7 characters

  logic       ph1 = 1'b0, ph2 = 1'b0;
  logic       reset;
  logic [2:0] sensors;
  logic       lcden, rs;
  logic [7:0] db;
  int checks = 0, failures = 0, cycles = 0;

  pig_top #(.COUNT_W(COUNT_W)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .sensors(sensors),
                                    .lcden(lcden), .rs(rs), .db(db));
  lcd_model lcd (.rs(rs), .e(lcden), .db(db));

  always begin
    #1 ph1 = 1'b1;
    #4 ph1 = 1'b0;
    #1 ph2 = 1'b1;
    #4 ph2 = 1'b0;
    cycles++;
  end

  // mechanism counters
  int coin_seen[6];
  int back_to_back = 0, carry_into[4], wraps = 0, resets = 0;

  // Decimal carries and wraps a deposit causes, from the reference total.
  task automatic count_carries(int old_total, int c);
    int p;
    p = 1;
    for (int i = 1; i < 4; i++) begin
      p *= 10;
      if ((old_total % p) + (c % p) >= p) carry_into[i]++;
    end
    if ((old_total % 10000) + c >= 10000) wraps++;
  endtask

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  function automatic logic [7:0] digit_char(int v);
    return 8'("0") + 8'(v % 10);
  endfunction

  task automatic check_display(int total);
    int t;
    t = total % 10000;
    check("row 1 'T'", lcd.char_at(0, 0) == "T");
    check("row 1 'o'", lcd.char_at(0, 1) == "o");
    check("row 1 't'", lcd.char_at(0, 2) == "t");
    check("row 1 'a'", lcd.char_at(0, 3) == "a");
    check("row 1 'l'", lcd.char_at(0, 4) == "l");
    check("row 1 blank", lcd.char_at(0, 5) == 8'hFE);
    check("row 2 '$'", lcd.char_at(1, 0) == "$");
    check("row 2 ten dollars", lcd.char_at(1, 1) == digit_char(t / 1000));
    check("row 2 dollars", lcd.char_at(1, 2) == digit_char(t / 100));
    check("row 2 '.'", lcd.char_at(1, 3) == ".");
    check("row 2 dimes", lcd.char_at(1, 4) == digit_char(t / 10));
    check("row 2 cents", lcd.char_at(1, 5) == digit_char(t));
    check("row 2 blank", lcd.char_at(1, 6) == 8'hFE);
    if (lcd.char_at(1, 5) != digit_char(t))
      $display("  shown $%c%c.%c%c expected %0d cents", lcd.char_at(1, 1), lcd.char_at(1, 2),
               lcd.char_at(1, 4), lcd.char_at(1, 5), t);
  endtask

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, burst, pick, gap;
    static int cents[6] = '{0, 1, 5, 10, 25, 100};
    static logic [2:0] codes[6] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101};
    reset = 1'b1; sensors = 3'b000;
    repeat (4) @(negedge ph1);
    reset = 1'b0;
    // initialisation, row 1 and one row-2 pass: 22 transfers
    repeat (24 * STEP_CYCLES) @(negedge ph1);
    check("display initialised", lcd.funcset_count >= 4 && lcd.dispoff_count >= 1 &&
                                 lcd.clear_count >= 1 && lcd.dispon_count >= 1);
    check("display on", lcd.display_on);
    total = 0;
    check_display(total);
    for (int b = 0; b < 60; b++) begin
      burst = $urandom_range(1, 15);
      for (int k = 0; k < burst; k++) begin
        pick = ($urandom_range(0, 9) < 4) ? 5 : $urandom_range(1, 4);
        sensors = codes[pick];
        count_carries(total, cents[pick]);
        total += cents[pick];
        coin_seen[pick]++;
        @(negedge ph1);
        gap = $urandom_range(0, 3);
        if (gap == 0) back_to_back++;
        sensors = 3'b000;
        repeat (gap) @(negedge ph1);
      end
      repeat (2 * REFRESH_CYCLES + 8) @(negedge ph1);
      check_display(total);
    end
    // reset in the middle of operation
    reset = 1'b1;
    repeat (2) @(negedge ph1);
    reset = 1'b0;
    resets++;
    total = 0;
    repeat (24 * STEP_CYCLES) @(negedge ph1);
    check_display(total);

    for (int i = 1; i < 6; i++) check($sformatf("coin type %0d deposited", i), coin_seen[i] > 0);
    check("back-to-back coins", back_to_back > 0);
    for (int i = 1; i < 4; i++) check($sformatf("carry into digit %0d", i), carry_into[i] > 0);
    check("total wrapped past $99.99", wraps > 0);
    check("row-2 refresh loop", lcd.line2_count >= 10);
    check("reset during operation", resets > 0);
    $display("coins p=%0d n=%0d d=%0d q=%0d $=%0d back-to-back=%0d carries=%0d/%0d/%0d wraps=%0d row2 refreshes=%0d",
             coin_seen[1], coin_seen[2], coin_seen[3], coin_seen[4], coin_seen[5], back_to_back,
             carry_into[1], carry_into[2], carry_into[3], wraps, lcd.line2_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
