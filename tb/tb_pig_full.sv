// tb_pig_full: the chip core at its default parameters (19-bit slow-clock
// divider, one LCD transfer per 2^19 cycles) through one complete operation:
// deposit one coin of each kind ($1.41 in all), let the controller initialise
// the LCD, write row 1 and one complete row 2, and check the LCD shows
// "Total" and "$01.41". Also checks that lcden first rises 2^18 cycles after reset
// and that the 21st transfer is latched 21 x 2^19 cycles after reset.
module tb_pig_full;
  logic       ph1 = 1'b0, ph2 = 1'b0;
  logic       reset;
  logic [2:0] sensors;
  logic       lcden, rs;
  logic [7:0] db;
  int checks = 0, failures = 0, cycles = 0;

  pig_top dut (.ph1(ph1), .ph2(ph2), .reset(reset), .sensors(sensors),
               .lcden(lcden), .rs(rs), .db(db));
  lcd_model lcd (.rs(rs), .e(lcden), .db(db));

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
    wait (cycles == 24 * (1 << 19));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start, first_step, falls;
    static logic [2:0] codes[5] = '{3'b001, 3'b010, 3'b011, 3'b100, 3'b101};
    reset = 1'b1; sensors = 3'b000;
    repeat (4) @(negedge ph1);
    reset = 1'b0;
    start = cycles;
    foreach (codes[i]) begin
      sensors = codes[i];
      @(negedge ph1);
      sensors = 3'b000;
      @(negedge ph1);
    end
    @(posedge lcden);
    first_step = cycles - start;
    check("first lcden rise 2^18 cycles after reset", first_step >= (1 << 18) - 2 && first_step <= (1 << 18) + 2);
    // 21 transfers latched by the LCD: 7 init commands, 6 row-1 characters,
    // cursor move, 7 row-2 characters (the idle state is left at the first
    // step, before lcden first falls, so the LCD never latches it)
    falls = 0;
    #1;
    while (lcd.data_count < 13) begin
      @(negedge lcden);
      falls++;
      #1;
    end
    check("row 2 complete after 21 transfers", falls == 21);
    check("one transfer per 2^19 cycles", cycles - start >= 21 * (1 << 19) - 8 && cycles - start <= 21 * (1 << 19) + 8);
    check("initialised", lcd.funcset_count >= 4 && lcd.clear_count >= 1 && lcd.display_on);
    check("row 1", lcd.char_at(0, 0) == "T" && lcd.char_at(0, 1) == "o" && lcd.char_at(0, 2) == "t" &&
                   lcd.char_at(0, 3) == "a" && lcd.char_at(0, 4) == "l");
    check("row 2 $01.41", lcd.char_at(1, 0) == "$" && lcd.char_at(1, 1) == "0" && lcd.char_at(1, 2) == "1" &&
                          lcd.char_at(1, 3) == "." && lcd.char_at(1, 4) == "4" && lcd.char_at(1, 5) == "1");
    $display("row 2: %c%c%c%c%c%c after %0d cycles", lcd.char_at(1, 0), lcd.char_at(1, 1), lcd.char_at(1, 2),
             lcd.char_at(1, 3), lcd.char_at(1, 4), lcd.char_at(1, 5), cycles - start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
