// tb_lcd_fsm: self-checking test of the LCD controller.
// The step enable is pulsed for one cycle every STEP cycles. Before each
// step the (rs, db) pair is compared with an independently written list of
// the expected LCD transfers: idle, four function-set commands, display off,
// clear, display on, "Total" + blank, cursor to row 2, then "$dd.dd" + blank
// and the cursor move repeated. The digit characters are changed at random
// between row-2 passes. Between steps rs/db must not change.
module tb_lcd_fsm;
  localparam int STEP = 3;
  logic       ph1 = 1'b0, ph2 = 1'b0;
  logic       reset, en, rs;
  logic [7:0] ones, tens, hundreds, thousands, db;
  int checks = 0, failures = 0, cycles = 0;

  lcd_fsm dut (.ph1(ph1), .ph2(ph2), .en(en), .reset(reset), .ones(ones), .tens(tens),
               .hundreds(hundreds), .thousands(thousands), .rs(rs), .db(db));

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

  // Expected transfers, as {rs, db}.
  logic [8:0] expect_q[$];

  task automatic push(logic r, logic [7:0] d);
    expect_q.push_back({r, d});
  endtask

  task automatic step_and_check(string what);
    logic [8:0] e;
    e = expect_q.pop_front();
    // rs/db must be stable over the idle cycles before the step
    for (int k = 0; k < STEP; k++) begin
      checks++;
      if ({rs, db} !== e) begin
        failures++;
        $display("FAIL %s: rs=%b db=%h expected rs=%b db=%h (cycle %0d)", what, rs, db, e[8], e[7:0], cycles);
      end
      en = (k == STEP - 1);
      @(negedge ph1);
    end
    en = 1'b0;
  endtask

  initial begin
    reset = 1'b1; en = 1'b0;
    ones = "0"; tens = "0"; hundreds = "0"; thousands = "0";
    repeat (3) @(negedge ph1);
    reset = 1'b0;
    push(0, 8'h00);
    repeat (4) push(0, 8'h3C);
    push(0, 8'h08); push(0, 8'h01); push(0, 8'h0C);
    push(1, "T"); push(1, "o"); push(1, "t"); push(1, "a"); push(1, "l"); push(1, 8'hFE);
    while (expect_q.size() > 0) step_and_check("init/row 1");
    for (int pass = 0; pass < 40; pass++) begin
      thousands = 8'("0") + 8'($urandom_range(0, 9));
      hundreds  = 8'("0") + 8'($urandom_range(0, 9));
      tens      = 8'("0") + 8'($urandom_range(0, 9));
      ones      = 8'("0") + 8'($urandom_range(0, 9));
      push(0, 8'hC0);
      push(1, "$"); push(1, thousands); push(1, hundreds); push(1, ".");
      push(1, tens); push(1, ones); push(1, 8'hFE);
      while (expect_q.size() > 0) step_and_check("row 2");
    end
    // reset returns to the start of the sequence
    reset = 1'b1;
    @(negedge ph1);
    reset = 1'b0;
    push(0, 8'h00); push(0, 8'h3C);
    while (expect_q.size() > 0) step_and_check("after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
