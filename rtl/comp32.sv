// comp32: 3:2 compressor (full adder).
//
// Reduces three bits of one column to a sum bit of the same weight and a carry bit of
// twice the weight: a + b + c = sum + 2*carry. Combinational. The cell is named in the
// design's reduction tree; its gate form (XOR sum, majority carry) is the textbook one.
module comp32 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (c & (a ^ b));
  end

endmodule
