// tb_booth_r8_encoder: exhaustive check of the radix-8 Booth encoder.
// For all 16 groups it rebuilds the digit from the selects and compares it with
// -4*g[3] + 2*g[2] + g[1] + g[0]; it also checks that at most one select is high
// and that a zero digit is never marked negative.
module tb_booth_r8_encoder;
  import mac_pkg::*;

  logic [3:0]  g;
  booth_sel_t  sel;
  int checks = 0, failures = 0;

  booth_r8_encoder dut (.group_bits(g), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int expect_d, got_mag, got_d, nsel;
      g = 4'(v);
      #1;
      expect_d = -4 * int'(g[3]) + 2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
      got_mag  = int'(sel.one) + 2 * int'(sel.two) + 3 * int'(sel.three) + 4 * int'(sel.four);
      got_d    = sel.neg ? -got_mag : got_mag;
      nsel     = int'(sel.one) + int'(sel.two) + int'(sel.three) + int'(sel.four);
      checks++;
      if (got_d != expect_d) begin
        failures++;
        $display("group %b: digit %0d, expected %0d", g, got_d, expect_d);
      end
      checks++;
      if (nsel > 1) begin
        failures++;
        $display("group %b: %0d selects high", g, nsel);
      end
      checks++;
      if (expect_d == 0 && sel.neg) begin
        failures++;
        $display("group %b: zero digit marked negative", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
