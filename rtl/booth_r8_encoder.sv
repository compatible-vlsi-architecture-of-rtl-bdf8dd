// booth_r8_encoder: radix-8 modified Booth encoder for one multiplier group.
//
// The multiplier is cut into overlapping 4-bit groups {y[3i+2], y[3i+1], y[3i], y[3i-1]};
// the first group takes a 0 as its lowest bit and every later group reuses the top bit
// of the one before. A group g stands for the digit -4*g[3] + 2*g[2] + g[1] + g[0],
// which lies in -4..+4. The encoder folds negative groups onto their magnitude by
// inverting the lower three bits when g[3] is set, then decodes the magnitude into
// one-hot selects for X, 2X, 3X and 4X. The all-ones group (digit 0) is not marked
// negative.
//
// Purely combinational; no clock. The grouping follows the published description of
// the algorithm; the sign-and-one-hot output encoding is this design's choice.
module booth_r8_encoder
  import mac_pkg::*;
(
  input  logic [3:0]  group_bits,  // {y[3i+2], y[3i+1], y[3i], y[3i-1]}
  output booth_sel_t  sel
);

  logic [2:0] a;  // magnitude bits after folding negative groups

  always_comb begin
    a = group_bits[3] ? ~group_bits[2:0] : group_bits[2:0];
    // |digit| = 2*a[2] + a[1] + a[0]
    sel.one   = ~a[2] & (a[1] ^ a[0]);
    sel.two   = (~a[2] & a[1] & a[0]) | (a[2] & ~a[1] & ~a[0]);
    sel.three =  a[2] & (a[1] ^ a[0]);
    sel.four  =  a[2] & a[1] & a[0];
    sel.neg   = group_bits[3] & ~(&group_bits[2:0]);
  end

endmodule
