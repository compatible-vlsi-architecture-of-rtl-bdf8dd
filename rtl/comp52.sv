// comp52: 5:2 compressor.
//
// Reduces five bits of one column plus two carry-ins from the column below to a sum
// bit and three bits of twice the weight:
//   a + b + c + d + e + cin1 + cin2 = sum + 2*(carry + cout1 + cout2).
// It is three chained 3:2 compressors: (a, b, c) give s1 and cout1; (s1, d, e) give
// s2 and cout2; (s2, cin1, cin2) give sum and carry. cout1 and cout2 never depend on
// cin1 or cin2, so a row of these cells, each column's cout1/cout2 feeding the next
// column's cin1/cin2, has no ripple path. The cell is named in the design's reduction
// tree; building it from 3:2 compressors is this design's choice. Combinational.
module comp52 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);

  logic s1, s2;

  comp32 u_fa1 (.a(a),  .b(b),    .c(c),    .sum(s1),  .carry(cout1));
  comp32 u_fa2 (.a(s1), .b(d),    .c(e),    .sum(s2),  .carry(cout2));
  comp32 u_fa3 (.a(s2), .b(cin1), .c(cin2), .sum(sum), .carry(carry));

endmodule
