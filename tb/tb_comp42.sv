// tb_comp42: exhaustive check of the 4:2 compressor.
// Checks a + b + c + d + cin = sum + 2*(carry + cout) for all 32 inputs, and that
// cout does not change when only cin changes (no ripple between columns).
module tb_comp42;
  logic a, b, c, d, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  comp42 dut (.a(a), .b(b), .c(c), .d(d), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int ci = 0; ci < 2; ci++) begin
        {a, b, c, d} = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(a) + int'(b) + int'(c) + int'(d) + int'(cin) !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("inputs %b%b%b%b cin %b: sum %b carry %b cout %b", a, b, c, d, cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("inputs %b%b%b%b: cout depends on cin", a, b, c, d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
