// compressor_accumulator: partial-product compression with the accumulation merged
// into it, plus the pipeline registers behind it.
//
// The previous result is never resolved into binary before it is added again. It is
// kept as four registered pieces: the lower N bits p_lo, already in binary; the carry
// c_lo out of that lower half; and the upper N bits as a sum row s_hi and a carry row
// c_hi. When acc is set these go back into the compressor tree as two extra rows,
// {s_hi, p_lo} and {c_hi, 0}, with c_lo dropped into bit N of the negation row (a
// column that row never uses). The tree reduces the G partial products, the negation
// row and the fed-back rows to one sum and one carry row; an N-bit adder resolves
// their lower halves into the next p_lo and c_lo, and the upper halves are registered
// as they are. Only the upper half ever needs the final carry-propagate adder, and it
// lies outside the loop.
//
// When acc is clear the fed-back rows are zero and the registers take X*Y alone.
// When valid is low the registers hold. Reset (rst_n low, synchronous) clears them.
// pp_corr[N] must be zero (booth_pp_gen never sets it); an assertion checks this.
// Timing: the registers load on the rising edge that sees valid; q_valid follows
// the same edge. Merging the accumulation into the tree and registering the low half
// in binary and the high half as sum and carry follow the published pipeline; the
// row order in the tree, the carry hand-off through bit N and the reset are this
// design's choices.
module compressor_accumulator
  import mac_pkg::*;
#(
  parameter int N = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 valid,  // a product is present this cycle
  input  logic                                 acc,    // add it to the held result
  input  logic [booth_groups(N)-1:0][2*N-1:0]  pp_rows,
  input  logic [2*N-1:0]                       pp_corr,
  output logic [N-1:0]                         s_hi,   // upper half, sum row
  output logic [N-1:0]                         c_hi,   // upper half, carry row
  output logic                                 c_lo,   // carry out of the lower half
  output logic [N-1:0]                         p_lo,   // lower half, binary
  output logic                                 q_valid
);

  localparam int G    = booth_groups(N);
  localparam int W    = 2 * N;
  localparam int ROWS = G + 3;

  logic [ROWS-1:0][W-1:0] tree_in;
  logic [W-1:0]           t_sum, t_carry;
  logic [N:0]             lo_add;

  always_comb begin
    for (int i = 0; i < G; i++) tree_in[i] = pp_rows[i];
    tree_in[G]   = pp_corr;
    tree_in[G+1] = '0;
    tree_in[G+2] = '0;
    if (acc) begin
      tree_in[G][N] = c_lo;
      tree_in[G+1]  = {s_hi, p_lo};
      tree_in[G+2]  = {c_hi, {N{1'b0}}};
    end
  end

  compressor_tree #(.ROWS(ROWS), .W(W)) u_tree (
    .rows  (tree_in),
    .sum   (t_sum),
    .carry (t_carry)
  );

  // The negation row must leave bit N free for the lower-half carry.
  a_corr_bit_n_free: assert property (@(posedge clk) disable iff (!rst_n)
    valid |-> !pp_corr[N]);

  always_comb lo_add = {1'b0, t_sum[N-1:0]} + {1'b0, t_carry[N-1:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_hi    <= '0;
      c_hi    <= '0;
      c_lo    <= 1'b0;
      p_lo    <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= valid;
      if (valid) begin
        s_hi <= t_sum[W-1:N];
        c_hi <= t_carry[W-1:N];
        c_lo <= lo_add[N];
        p_lo <= lo_add[N-1:0];
      end
    end
  end

endmodule
