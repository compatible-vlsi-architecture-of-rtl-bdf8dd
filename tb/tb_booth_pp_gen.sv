// tb_booth_pp_gen: checks that the partial-product rows and the negation row of the
// radix-8 Booth generator add up to the signed product X*Y modulo 2^(2N).
// Runs the default 32-bit generator on corner and random operands, and 8-bit and
// 6-bit ones exhaustively over all operand pairs. It also checks that bit N of the negation
// row, which the accumulator relies on being free, is always zero.
module tb_booth_pp_gen;
  import mac_pkg::*;

  localparam int N  = 32;
  localparam int G  = booth_groups(N);
  localparam int NS = 8;
  localparam int GS = booth_groups(NS);

  logic [N-1:0]               x, y;
  logic [G-1:0][2*N-1:0]      rows;
  logic [2*N-1:0]             corr;
  logic [NS-1:0]              xs, ys;
  logic [GS-1:0][2*NS-1:0]    rows_s;
  logic [2*NS-1:0]            corr_s;
  localparam int NT = 6;            // a width that is a multiple of three
  localparam int GT = booth_groups(NT);
  logic [NT-1:0]              xt, yt;
  logic [GT-1:0][2*NT-1:0]    rows_t;
  logic [2*NT-1:0]            corr_t;
  int checks = 0, failures = 0;

  booth_pp_gen dut (.x(x), .y(y), .rows(rows), .corr(corr));
  booth_pp_gen #(.N(NS)) dut_s (.x(xs), .y(ys), .rows(rows_s), .corr(corr_s));
  booth_pp_gen #(.N(NT)) dut_t (.x(xt), .y(yt), .rows(rows_t), .corr(corr_t));

  task automatic check32(input logic [N-1:0] tx, input logic [N-1:0] ty);
    logic [2*N-1:0] total, expected;
    x = tx; y = ty;
    #1;
    total = corr;
    for (int i = 0; i < G; i++) total += rows[i];
    expected = 64'($signed(tx)) * 64'($signed(ty));
    checks++;
    if (total !== expected) begin
      failures++;
      $display("N=32: %h * %h rows add to %h, expected %h", tx, ty, total, expected);
    end
    checks++;
    if (corr[N] !== 1'b0) begin
      failures++;
      $display("N=32: negation row uses bit N");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    for (int vx = 0; vx < 64; vx++) begin
      for (int vy = 0; vy < 64; vy++) begin
        logic [2*NT-1:0] total, expected;
        xt = 6'(vx); yt = 6'(vy);
        #1;
        total = corr_t;
        for (int i = 0; i < GT; i++) total += rows_t[i];
        expected = 12'($signed(xt)) * 12'($signed(yt));
        checks++;
        if (total !== expected) begin
          failures++;
          if (failures < 10) $display("N=6: %h * %h rows add to %h, expected %h", xt, yt, total, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = '0; ys = '0; xt = '0; yt = '0;
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h7fff_ffff, 32'h8000_0000);
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'h0000_7b0d, 32'h0000_6673);
    check32(32'h1234_5678, 32'h0000_0000);
    for (int i = 0; i < 3000; i++) check32($urandom, $urandom);

    for (int vx = 0; vx < 256; vx++) begin
      for (int vy = 0; vy < 256; vy++) begin
        logic [2*NS-1:0] total, expected;
        xs = 8'(vx); ys = 8'(vy);
        #1;
        total = corr_s;
        for (int i = 0; i < GS; i++) total += rows_s[i];
        expected = 16'($signed(xs)) * 16'($signed(ys));
        checks++;
        if (total !== expected) begin
          failures++;
          if (failures < 10) $display("N=8: %h * %h rows add to %h, expected %h", xs, ys, total, expected);
        end
      end
    end
    for (int vx = 0; vx < 64; vx++) begin
      for (int vy = 0; vy < 64; vy++) begin
        logic [2*NT-1:0] total, expected;
        xt = 6'(vx); yt = 6'(vy);
        #1;
        total = corr_t;
        for (int i = 0; i < GT; i++) total += rows_t[i];
        expected = 12'($signed(xt)) * 12'($signed(yt));
        checks++;
        if (total !== expected) begin
          failures++;
          if (failures < 10) $display("N=6: %h * %h rows add to %h, expected %h", xt, yt, total, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
