// tb_mac_n16: the multiply-accumulate unit at 16-bit operands (32-bit result), the
// size of the reference simulation, whose operands were 16'h7b0d and 16'h6673.
// It first runs that pair as a plain product, then 20000 random operations (fresh
// products, accumulations and idle cycles) against a 32-bit reference accumulator,
// checking p and p_valid one clock after the stage-2 registers load.
module tb_mac_n16;
  localparam int N = 16;
  localparam int W = 2 * N;

  logic         clk = 1'b0, rst_n, in_valid, acc, p_valid;
  logic [N-1:0] x, y;
  logic [W-1:0] p, model, exp_p;
  logic         exp_v;
  int checks = 0, failures = 0;

  mac_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .acc(acc), .x(x), .y(y),
    .p(p), .p_valid(p_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v, input logic a, input logic [N-1:0] tx, input logic [N-1:0] ty);
    logic [W-1:0] prod;
    in_valid = v; acc = a; x = tx; y = ty;
    prod = W'($signed(tx)) * W'($signed(ty));
    if (v) model = a ? model + prod : prod;
    @(posedge clk);
    #1;
    checks++;
    if (p_valid !== exp_v || (exp_v && p !== exp_p)) begin
      failures++;
      if (failures < 10) $display("t=%0t: p %h valid %b, expected %h valid %b", $time, p, p_valid, exp_p, exp_v);
    end
    exp_p = model; exp_v = v;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; acc = 1'b0; x = '0; y = '0;
    model = '0; exp_p = '0; exp_v = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    step(1'b1, 1'b0, 16'h7b0d, 16'h6673);
    step(1'b0, 1'b0, '0, '0);
    checks++;
    if (p !== 32'h313e_74d7) begin failures++; $display("7b0d * 6673 = %h", p); end
    $display("7b0d * 6673 = %h", p);
    for (int it = 0; it < 20000; it++)
      step(($urandom % 6) != 0, ($urandom % 4) != 0, 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
