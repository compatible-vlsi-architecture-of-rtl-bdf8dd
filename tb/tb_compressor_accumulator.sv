// tb_compressor_accumulator: drives the compressor-accumulator with random partial-
// product rows (negation row kept clear at bit N, as the generator guarantees) and
// checks the registered state against a reference accumulator:
//   acc=0: state = sum of rows;  acc=1: state += sum of rows;  valid=0: state held.
// The state read back is {s_hi + c_hi + c_lo, p_lo}. It also checks that q_valid
// follows valid by one clock and that reset clears the state.
module tb_compressor_accumulator;
  import mac_pkg::*;

  localparam int N = 32;
  localparam int G = booth_groups(N);
  localparam int W = 2 * N;

  logic clk = 1'b0, rst_n, valid, acc, c_lo, q_valid;
  logic [G-1:0][W-1:0] pp_rows;
  logic [W-1:0]        pp_corr, model;
  logic [N-1:0]        s_hi, c_hi, p_lo;
  int checks = 0, failures = 0;
  int n_acc = 0, n_clear = 0, n_hold = 0;

  compressor_accumulator dut (
    .clk(clk), .rst_n(rst_n), .valid(valid), .acc(acc), .pp_rows(pp_rows),
    .pp_corr(pp_corr), .s_hi(s_hi), .c_hi(c_hi), .c_lo(c_lo), .p_lo(p_lo), .q_valid(q_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] state();
    return {s_hi + c_hi + N'(c_lo), p_lo};
  endfunction

  initial begin
    rst_n = 1'b0; valid = 1'b0; acc = 1'b0; pp_rows = '0; pp_corr = '0; model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (state() !== '0 || q_valid !== 1'b0) begin failures++; $display("reset did not clear"); end
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      logic [W-1:0] total;
      logic         v;
      v     = ($urandom % 4) != 0;
      valid = v;
      acc   = ($urandom % 5) != 0;
      total = '0;
      for (int i = 0; i < G; i++) begin
        pp_rows[i] = (it % 97 == 5) ? '1 : {$urandom, $urandom};
        total += pp_rows[i];
      end
      pp_corr = {$urandom, $urandom};
      pp_corr[N] = 1'b0;
      total += pp_corr;
      if (v) begin
        if (acc) begin model = model + total; n_acc++; end
        else     begin model = total; n_clear++; end
      end else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (state() !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: state %h, expected %h", it, state(), model);
      end
      checks++;
      if (q_valid !== v) begin failures++; $display("cycle %0d: q_valid %b", it, q_valid); end
    end
    checks++;
    if (n_acc == 0 || n_clear == 0 || n_hold == 0) begin
      failures++;
      $display("not every mode ran: acc %0d clear %0d hold %0d", n_acc, n_clear, n_hold);
    end
    $display("accumulate %0d, fresh %0d, hold %0d", n_acc, n_clear, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
