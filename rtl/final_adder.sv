// final_adder: carry-propagate adder that turns the upper sum and carry rows into
// binary.
//
// s = a + b + cin, modulo 2^N. In the multiply-accumulate pipeline a and b are the
// registered upper halves of the sum and carry rows and cin is the registered carry
// out of the lower half, so s is P[2N-1:N]. Combinational. The published design only
// names a final adder; a plain carry-propagate adder, left to synthesis to map, is
// this design's choice.
module final_adder #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s
);

  always_comb s = a + b + N'(cin);

endmodule
