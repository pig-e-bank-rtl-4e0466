// tb_pig_penny: the chip core's power-up check with a single penny.
//
// After reset one penny is deposited (a one-cycle sensor pulse). The test
// then watches the LCD bus at every falling edge of lcden, where the display
// latches it, and checks the order of events: the first character written
// (rs = 1) is 'T', the first row-2 cursor command (0xC0) follows the row-1
// message, the first character after it is '$', and the finished row 2 reads
// "$00.01". The slow-clock divider is shortened (COUNT_W = 6).
module tb_pig_penny;
  logic       ph1 = 1'b0, ph2 = 1'b0;
  logic       reset;
  logic [2:0] sensors;
  logic       lcden, rs;
  logic [7:0] db;
  int checks = 0, failures = 0, cycles = 0;

  pig_top #(.COUNT_W(6)) dut (.ph1(ph1), .ph2(ph2), .reset(reset), .sensors(sensors),
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
      $display("FAIL %s at cycle %0d (rs=%b db=%h)", what, cycles, rs, db);
    end
  endtask

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic seen_t, seen_cursor, seen_dollar;
    reset = 1'b1; sensors = 3'b000;
    repeat (4) @(negedge ph1);
    reset = 1'b0;
    sensors = 3'b001;
    @(negedge ph1);
    sensors = 3'b000;
    seen_t = 1'b0; seen_cursor = 1'b0; seen_dollar = 1'b0;
    while (!seen_dollar) begin
      @(negedge lcden);
      if (rs && !seen_t) begin
        check("first character is 'T'", db == "T");
        seen_t = 1'b1;
      end else if (!rs && db[7] && seen_t && !seen_cursor) begin
        check("cursor moves to row 2 column 0", db == 8'hC0);
        check("row 1 finished before the cursor move", lcd.data_count == 6);
        seen_cursor = 1'b1;
      end else if (rs && seen_cursor) begin
        check("first row-2 character is '$'", db == "$");
        seen_dollar = 1'b1;
      end
    end
    repeat (8 * 64) @(negedge ph1);
    check("row 2 shows $00.01", lcd.char_at(1, 0) == "$" && lcd.char_at(1, 1) == "0" &&
                                lcd.char_at(1, 2) == "0" && lcd.char_at(1, 3) == "." &&
                                lcd.char_at(1, 4) == "0" && lcd.char_at(1, 5) == "1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
