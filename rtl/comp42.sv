// comp42: 4:2 compressor built from XOR gates and multiplexers.
//
// Reduces four bits of one column plus a carry-in from the column below to a sum bit,
// a carry bit and a carry-out, both of twice the weight:
//   a + b + c + d + cin = sum + 2*(carry + cout).
// The carry-out depends only on a, b and c, never on cin, so a row of these cells has
// no ripple path. Where a full-adder pair would use the XOR of the lower stage to pick
// the carry, this cell uses multiplexers steered by the XOR terms instead:
//   cout  = (a ^ b)          ? c   : a
//   carry = (a ^ b ^ c ^ d)  ? cin : d
// Replacing XOR stages on the carry paths with multiplexers follows the published
// description; the exact gate arrangement above is the common mux-based 4:2 cell.
// Combinational.
module comp42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic x_ab, x_cd, x_all;

  always_comb begin
    x_ab  = a ^ b;
    x_cd  = c ^ d;
    x_all = x_ab ^ x_cd;
    cout  = x_ab  ? c   : a;
    sum   = x_all ^ cin;
    carry = x_all ? cin : d;
  end

endmodule
