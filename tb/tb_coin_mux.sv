// tb_coin_mux: self-checking test of the coin-value datapath. For every 3-bit
// sensor code the output must be the coin's value in cents written as four
// BCD digits: 0, 1, 5, 10, 25, 100 for codes 000..101 and 0 for 110/111.
// The expected BCD words are computed here from the cent values.
module tb_coin_mux;
  logic [2:0]  sensors;
  logic [15:0] coin;
  int checks = 0, failures = 0;

  coin_mux dut (.sensors(sensors), .coin(coin));

  function automatic logic [15:0] to_bcd(int cents);
    return 16'((cents / 1000 % 10) << 12 | (cents / 100 % 10) << 8 |
               (cents / 10 % 10) << 4 | (cents % 10));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int cents_of_code[8] = '{0, 1, 5, 10, 25, 100, 0, 0};
    for (int rep = 0; rep < 4; rep++) begin
      for (int code = 0; code < 8; code++) begin
        sensors = 3'(code);
        #1;
        checks++;
        if (coin !== to_bcd(cents_of_code[code])) begin
          failures++;
          $display("FAIL sensors=%03b coin=%h expected=%h", sensors, coin,
                   to_bcd(cents_of_code[code]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
