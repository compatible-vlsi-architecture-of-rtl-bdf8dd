// booth_pp_gen: radix-8 Booth partial-product generator.
//
// Cuts the N-bit two's-complement multiplier Y into G = ceil(N/3) overlapping 4-bit
// groups, encodes each with booth_r8_encoder and selects 0, X, 2X, 3X or 4X of the
// multiplicand X for it. 3X, the only multiple that is not a shift, is formed once by
// an adder (X + 2X). A negative digit inverts the selected multiple; the 1 that
// completes the two's complement is not added here but placed at the row's LSB
// (bit 3i) in a separate correction row, so the compressor tree adds it for free.
// Each row is sign-extended over the full 2N-bit product width and shifted left by
// 3i. All arithmetic is modulo 2^(2N), the width of the product.
//
// Interface: x, y in; G rows plus one correction row out, 2N bits each. Bits 3i of
// the correction row are the only ones it uses, so bit N is always free (3(G-1) < N)
// for the accumulator to insert its low-half carry.
// Purely combinational. Full sign extension of every row is this design's choice;
// the grouping and the digit set follow the published algorithm.
module booth_pp_gen
  import mac_pkg::*;
#(
  parameter int N = 32  // operand width (both X and Y)
) (
  input  logic [N-1:0]                    x,        // multiplicand, two's complement
  input  logic [N-1:0]                    y,        // multiplier, two's complement
  output logic [booth_groups(N)-1:0][2*N-1:0] rows, // one partial product per group
  output logic [2*N-1:0]                  corr      // negation bits at positions 3i
);

  localparam int G  = booth_groups(N);
  localparam int W  = 2 * N;
  localparam int MW = N + 3;       // width that holds 4X of an N-bit signed value
  localparam int YW = 3 * G + 1;   // multiplier with the appended 0 and sign extension

  logic signed [MW-1:0] x1, x2, x3, x4;
  logic [YW-1:0]        y_ext;
  booth_sel_t           sel [G];

  always_comb begin
    x1 = MW'(signed'(x));
    x2 = x1 <<< 1;
    x4 = x1 <<< 2;
    x3 = x1 + x2;                  // hard multiple
    y_ext = {{(YW - N - 1){y[N-1]}}, y, 1'b0};
  end

  for (genvar i = 0; i < G; i++) begin : g_row
    logic [MW-1:0] mult;
    logic [MW-1:0] mult_inv;
    logic [W-1:0]  row_ext;

    booth_r8_encoder u_enc (
      .group_bits (y_ext[3*i +: 4]),
      .sel        (sel[i])
    );

    always_comb begin
      mult = ({MW{sel[i].one}}   & x1) |
             ({MW{sel[i].two}}   & x2) |
             ({MW{sel[i].three}} & x3) |
             ({MW{sel[i].four}}  & x4);
      mult_inv = sel[i].neg ? ~mult : mult;
      row_ext  = {{(W - MW){mult_inv[MW-1]}}, mult_inv};
      rows[i]  = row_ext << (3 * i);
    end
  end

  always_comb begin
    corr = '0;
    for (int i = 0; i < G; i++) corr[3*i] = sel[i].neg;
  end

endmodule
