// tb_comp52: exhaustive check of the 5:2 compressor.
// Checks a + b + c + d + e + cin1 + cin2 = sum + 2*(carry + cout1 + cout2) for all 128
// inputs, and that cout1 and cout2 do not depend on cin1 or cin2.
module tb_comp52;
  logic a, b, c, d, e, cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  comp52 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .cin1(cin1), .cin2(cin2),
              .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [1:0] couts0;
      for (int ci = 0; ci < 4; ci++) begin
        {a, b, c, d, e} = 5'(v);
        {cin1, cin2} = 2'(ci);
        #1;
        checks++;
        if (int'(a) + int'(b) + int'(c) + int'(d) + int'(e) + int'(cin1) + int'(cin2) !=
            int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2))) begin
          failures++;
          $display("inputs %b cins %b: sum %b carry %b couts %b%b", 5'(v), 2'(ci), sum, carry, cout1, cout2);
        end
        if (ci == 0) couts0 = {cout1, cout2};
        else begin
          checks++;
          if ({cout1, cout2} != couts0) begin
            failures++;
            $display("inputs %b: couts depend on cins", 5'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
