// tb_compressor_tree: checks sum + carry = sum of all rows (mod 2^W) for the default
// 14-row, 64-bit tree and for trees of 3, 4, 5, 7 and 9 rows, which exercise the 3:2,
// 4:2 and 5:2 levels and the pass-through of leftover rows. Rows are random, plus
// all-ones rows to force the longest carries.
module tb_compressor_tree;
  localparam int W = 64;
  int checks = 0, failures = 0;

  logic [13:0][W-1:0] r14; logic [W-1:0] s14, c14;
  logic [2:0][15:0]   r3;  logic [15:0]  s3,  c3;
  logic [3:0][15:0]   r4;  logic [15:0]  s4,  c4;
  logic [4:0][15:0]   r5;  logic [15:0]  s5,  c5;
  logic [6:0][15:0]   r7;  logic [15:0]  s7,  c7;
  logic [8:0][15:0]   r9;  logic [15:0]  s9,  c9;

  compressor_tree dut (.rows(r14), .sum(s14), .carry(c14));
  compressor_tree #(.ROWS(3), .W(16)) t3 (.rows(r3), .sum(s3), .carry(c3));
  compressor_tree #(.ROWS(4), .W(16)) t4 (.rows(r4), .sum(s4), .carry(c4));
  compressor_tree #(.ROWS(5), .W(16)) t5 (.rows(r5), .sum(s5), .carry(c5));
  compressor_tree #(.ROWS(7), .W(16)) t7 (.rows(r7), .sum(s7), .carry(c7));
  compressor_tree #(.ROWS(9), .W(16)) t9 (.rows(r9), .sum(s9), .carry(c9));

  function automatic logic [W-1:0] rnd64(input bit ones);
    return ones ? '1 : {$urandom, $urandom};
  endfunction

  task automatic chk(input string name, input logic [W-1:0] got, input logic [W-1:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      if (failures < 10) $display("%s: sum+carry %h, expected %h", name, got, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      logic [W-1:0] e14;
      logic [15:0]  e3, e4, e5, e7, e9;
      bit ones;
      ones = (it < 4);
      e14 = '0; e3 = '0; e4 = '0; e5 = '0; e7 = '0; e9 = '0;
      for (int i = 0; i < 14; i++) begin r14[i] = rnd64(ones); e14 += r14[i]; end
      for (int i = 0; i < 3; i++) begin r3[i] = 16'(rnd64(ones)); e3 += r3[i]; end
      for (int i = 0; i < 4; i++) begin r4[i] = 16'(rnd64(ones)); e4 += r4[i]; end
      for (int i = 0; i < 5; i++) begin r5[i] = 16'(rnd64(ones)); e5 += r5[i]; end
      for (int i = 0; i < 7; i++) begin r7[i] = 16'(rnd64(ones)); e7 += r7[i]; end
      for (int i = 0; i < 9; i++) begin r9[i] = 16'(rnd64(ones)); e9 += r9[i]; end
      #1;
      chk("14x64", s14 + c14, e14);
      chk("3x16", 64'(16'(s3 + c3)), 64'(e3));
      chk("4x16", 64'(16'(s4 + c4)), 64'(e4));
      chk("5x16", 64'(16'(s5 + c5)), 64'(e5));
      chk("7x16", 64'(16'(s7 + c7)), 64'(e7));
      chk("9x16", 64'(16'(s9 + c9)), 64'(e9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
