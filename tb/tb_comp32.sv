// tb_comp32: exhaustive check of the 3:2 compressor: a + b + c = sum + 2*carry.
module tb_comp32;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  comp32 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(a) + int'(b) + int'(c) != int'(sum) + 2 * int'(carry)) begin
        failures++;
        $display("inputs %b%b%b: sum %b carry %b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
