// tb_mux6_1x: exhaustive self-checking test of the one-bit 6:1 mux slice.
// Applies every select code (with sb = ~s) and every combination of the six
// data inputs, and compares f with the expected input (0 for codes 110/111).
module tb_mux6_1x;
  logic       u, v, w, x, y, z, f;
  logic [2:0] s, sb;
  int checks = 0, failures = 0;

  mux6_1x dut (.u(u), .v(v), .w(w), .x(x), .y(y), .z(z), .s(s), .sb(sb), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] data;
    logic       expected;
    for (int sel = 0; sel < 8; sel++) begin
      for (int d = 0; d < 64; d++) begin
        data = 6'(d);
        {z, y, x, w, v, u} = data;
        s  = 3'(sel);
        sb = ~3'(sel);
        #1;
        expected = (sel < 6) ? data[sel] : 1'b0;
        checks++;
        if (f !== expected) begin
          failures++;
          $display("FAIL s=%03b data=%06b f=%b expected=%b", s, data, f, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
