// mac_top: pipelined multiplier-accumulator built on radix-8 modified Booth encoding.
//
// Computes P = X*Y (acc low) or P = X*Y + P_previous (acc high) on N-bit two's-
// complement operands, with a 2N-bit result that wraps modulo 2^(2N). One new
// operation can start every clock.
//
// Pipeline:
//   stage 1  input registers for X, Y and the control bits;
//   stage 2  booth_pp_gen (Booth encoder, partial products, 3X) feeding
//            compressor_accumulator, whose tree also takes the held result back in
//            as sum and carry rows; its registers hold the low half in binary and
//            the high half as sum and carry;
//   output   final_adder adds the high sum and carry rows (plus the low-half carry)
//            into P[2N-1:N]; P[N-1:0] comes straight from its register.
// Latency: x, y, acc and in_valid sampled at rising edge k give p and p_valid after
// edge k+1, i.e. two clocks. The output adder is combinational, as in the published
// pipeline drawing, so p changes after the edge and settles within the cycle.
//
// Interface: synchronous active-low reset clears every register, so after reset the
// held result is zero. When in_valid is low nothing is sampled and the held result
// keeps its value. The operand width, the stage order and the accumulation in sum
// and carry form follow the published design; the control signals, the signed
// two's-complement operands and the reset are this design's choices.
module mac_top
  import mac_pkg::*;
#(
  parameter int N = 32  // operand width; the product and accumulator are 2N bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         acc,
  input  logic [N-1:0] x,        // multiplicand
  input  logic [N-1:0] y,        // multiplier (Booth-encoded)
  output logic [2*N-1:0] p,
  output logic           p_valid
);

  localparam int G = booth_groups(N);
  localparam int W = 2 * N;

  // stage 1: input registers
  logic [N-1:0] x_r, y_r;
  logic         acc_r, valid_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_r     <= '0;
      y_r     <= '0;
      acc_r   <= 1'b0;
      valid_r <= 1'b0;
    end else begin
      valid_r <= in_valid;
      if (in_valid) begin
        x_r   <= x;
        y_r   <= y;
        acc_r <= acc;
      end
    end
  end

  // stage 2: Booth encoding, partial products, compression with accumulation
  logic [G-1:0][W-1:0] pp_rows;
  logic [W-1:0]        pp_corr;
  logic [N-1:0]        s_hi, c_hi, p_lo, p_hi;
  logic                c_lo;

  booth_pp_gen #(.N(N)) u_ppgen (
    .x    (x_r),
    .y    (y_r),
    .rows (pp_rows),
    .corr (pp_corr)
  );

  compressor_accumulator #(.N(N)) u_cacc (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid   (valid_r),
    .acc     (acc_r),
    .pp_rows (pp_rows),
    .pp_corr (pp_corr),
    .s_hi    (s_hi),
    .c_hi    (c_hi),
    .c_lo    (c_lo),
    .p_lo    (p_lo),
    .q_valid (p_valid)
  );

  // output: final carry-propagate adder on the upper half
  final_adder #(.N(N)) u_fadd (
    .a   (s_hi),
    .b   (c_hi),
    .cin (c_lo),
    .s   (p_hi)
  );

  assign p = {p_hi, p_lo};

endmodule
