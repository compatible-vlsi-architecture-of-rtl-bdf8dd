// mac_pkg: types and sizing helpers shared by the radix-8 Booth multiply-accumulate
// datapath.
//
// A radix-8 Booth digit lies in -4..+4. It is carried between the encoder and the
// partial-product generator as a sign bit plus one-hot magnitude selects, the form a
// multiplexer-based partial-product row uses directly. A digit of zero has every
// select low and the sign low.
//
// booth_groups(n) is the number of overlapping 4-bit groups an n-bit two's-complement
// multiplier is cut into: one per three bits, rounded up (11 for 32 bits, 6 for 16).
package mac_pkg;

  typedef struct packed {
    logic neg;    // digit is negative: the row is inverted and a 1 added at its LSB
    logic one;    // |digit| = 1 -> X
    logic two;    // |digit| = 2 -> 2X
    logic three;  // |digit| = 3 -> 3X (hard multiple)
    logic four;   // |digit| = 4 -> 4X
  } booth_sel_t;

  function automatic int booth_groups(input int n);
    return (n + 2) / 3;
  endfunction

  // Rows after one level of the compressor tree: each 5:2 group gives two rows,
  // a leftover of four (4:2) or three (3:2) rows gives two, one or two pass through.
  function automatic int tree_next_rows(input int rows);
    int rem;
    rem = rows % 5;
    return 2 * (rows / 5) + ((rem >= 3) ? 2 : rem);
  endfunction

  // Rows left after a given number of tree levels.
  function automatic int tree_rows_at(input int rows, input int level);
    int r;
    r = rows;
    for (int l = 0; l < level; l++) r = tree_next_rows(r);
    return r;
  endfunction

  // Number of levels needed to bring the rows down to two.
  function automatic int tree_levels(input int rows);
    int r, l;
    r = rows;
    l = 0;
    while (r > 2) begin
      r = tree_next_rows(r);
      l++;
    end
    return l;
  endfunction

endpackage
