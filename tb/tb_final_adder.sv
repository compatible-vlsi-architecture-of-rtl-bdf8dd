// tb_final_adder: random and corner checks of the final carry-propagate adder,
// s = a + b + cin mod 2^N, at the default width of 32 bits.
module tb_final_adder;
  localparam int N = 32;
  logic [N-1:0] a, b, s;
  logic         cin;
  int checks = 0, failures = 0;

  final_adder dut (.a(a), .b(b), .cin(cin), .s(s));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] expected;
    a = ta; b = tb_; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + {{N{1'b0}}, tc};
    checks++;
    if (s !== expected[N-1:0]) begin
      failures++;
      $display("%h + %h + %b = %h, expected %h", ta, tb_, tc, s, expected[N-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(32'h7fff_ffff, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
