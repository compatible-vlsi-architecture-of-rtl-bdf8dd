// tb_mac_top: end-to-end test of the pipelined Booth multiply-accumulate unit at its
// default size (32-bit operands, 64-bit result), with no parameter overrides.
//
// A reference model keeps the accumulated value as a 64-bit number:
//   acc=0: P = X*Y;   acc=1: P = P + X*Y (mod 2^64);   in_valid=0: P held.
// Every cycle the test drives a new operation and, after the clock edge that follows
// the one that sampled an operation, compares p and p_valid with the model. It makes
// each mechanism happen and counts it: fresh products, accumulations, idle cycles that must hold the result,
// accumulator wrap-around past 64 bits, reset in mid-stream, and back-to-back
// accumulation chains. It also measures the latency of a lone operation (two clocks)
// and runs the operand pair 0x7b0d * 0x6673 from the reference simulation.
module tb_mac_top;
  localparam int N = 32;
  localparam int W = 2 * N;

  logic         clk = 1'b0, rst_n, in_valid, acc, p_valid;
  logic [N-1:0] x, y;
  logic [W-1:0] p;

  int checks = 0, failures = 0;
  int n_fresh = 0, n_acc = 0, n_idle = 0, n_wrap = 0, n_reset = 0, n_chain = 0;

  // expected output once the edge after the sampling edge has passed
  logic [W-1:0] model;
  logic [W-1:0] exp_p;
  logic         exp_v;
  int           run_len;

  mac_top dut (
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

  function automatic logic [W-1:0] sprod(input logic [N-1:0] a, input logic [N-1:0] b);
    return W'($signed(a)) * W'($signed(b));
  endfunction

  // drive one cycle's input, advance the model, then check the output of two cycles ago
  task automatic step(input logic v, input logic a, input logic [N-1:0] tx, input logic [N-1:0] ty);
    logic [W-1:0] prod;
    logic signed [W:0] wide;
    in_valid = v; acc = a; x = tx; y = ty;
    if (v) begin
      prod = sprod(tx, ty);
      if (a) begin
        wide = {model[W-1], model} + {prod[W-1], prod};
        if (wide[W] != wide[W-1]) n_wrap++;
        model = model + prod;
        n_acc++;
        run_len++;
        if (run_len == 8) n_chain++;
      end else begin
        model = prod;
        n_fresh++;
        run_len = 0;
      end
    end else n_idle++;
    @(posedge clk);
    #1;
    // the operation sampled at the edge before this one is at the output now
    checks++;
    if (p_valid !== exp_v || (exp_v && p !== exp_p)) begin
      failures++;
      if (failures < 10)
        $display("t=%0t: p %h valid %b, expected %h valid %b", $time, p, p_valid, exp_p, exp_v);
    end
    exp_p = model; exp_v = v;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    model = '0; run_len = 0;
    exp_v = 1'b0; exp_p = '0;
    checks++;
    if (p !== '0 || p_valid !== 1'b0) begin failures++; $display("reset did not clear the output"); end
    n_reset++;
  endtask

  initial begin
    int lat;
    rst_n = 1'b0; in_valid = 1'b0; acc = 1'b0; x = '0; y = '0;
    do_reset();

    // latency of one operation after idle cycles
    step(1'b1, 1'b0, 32'h0000_7b0d, 32'h0000_6673);
    in_valid = 1'b0;
    lat = 1;
    while (!p_valid && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d clocks, expected 2", lat); end
    checks++;
    if (p !== 64'h0000_0000_313e_74d7) begin failures++; $display("7b0d*6673 gave %h", p); end
    $display("latency %0d clocks, 7b0d * 6673 = %h", lat, p);
    do_reset();

    // corners and wrap-around: (-2^31)^2 = 2^62, four of them pass 2^63
    step(1'b1, 1'b0, 32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 6; i++) step(1'b1, 1'b1, 32'h8000_0000, 32'h8000_0000);
    step(1'b1, 1'b0, 32'h7fff_ffff, 32'h8000_0000);
    step(1'b1, 1'b1, 32'hffff_ffff, 32'hffff_ffff);
    step(1'b0, 1'b1, 32'h1234_5678, 32'h9abc_def0);
    step(1'b1, 1'b1, 32'h0000_0000, 32'h1234_5678);

    // random stream with accumulation chains, fresh starts and idle cycles
    for (int it = 0; it < 20000; it++) begin
      logic v, a;
      v = ($urandom % 6) != 0;
      a = ($urandom % 10) != 0;
      if (it == 10000) do_reset();
      step(v, a, $urandom, $urandom);
    end
    step(1'b0, 1'b0, '0, '0);
    step(1'b0, 1'b0, '0, '0);

    $display("fresh %0d, accumulate %0d, idle %0d, wrap %0d, reset %0d, chains>=8 %0d",
             n_fresh, n_acc, n_idle, n_wrap, n_reset, n_chain);
    checks++;
    if (n_fresh == 0 || n_acc == 0 || n_idle == 0 || n_wrap == 0 || n_reset < 2 || n_chain == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
