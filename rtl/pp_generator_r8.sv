// Radix-8 partial product generator with sign-prefix rows and a correction
// word (ECW).
//
// For every Booth digit d_j (from booth_encoder_r8) it forms one partial
// product row and places it at bit offset 3*j of the 2N-bit product, so row 1
// sits three places left of row 0, row 2 six places, and so on. Bits of the
// array that no row reaches are zero.
//
// How a row is built:
//   * The multiples A, 2A and 4A are shifts of the sign-extended
//     multiplicand; the hard multiple 3A = A + 2A is made once by an adder
//     and shared by all rows.
//   * The one-hot magnitude selects pick |d_j| * A, a W = N+2 bit signed
//     value, with an AND-OR; a negative digit inverts it (one's complement).
//     The missing "+1" of the two's complement is the negation bit neg_j.
//   * Sign extension is not written out. Instead a short prefix goes on top
//     of each row, where s is the row's sign bit (bit W-1):
//         row 0:      ~s  s  s  s   (4 bits)
//         rows 1..:    1  1 ~s      (3 bits)
//     The prefixes add exactly what the full sign extensions of all rows
//     would add, apart from a multiple of 2^(W+3G), which is beyond the
//     product width and drops out. So the rows need no extra constant row.
//   * The negation bits neg_j, weight 2^(3j), are collected into one extra
//     row, the correction word ecw. Together the array is G rows plus one,
//     against G rows, a sign-extension constant and the correction bits of a
//     plain Booth array.
//
// Many output bits are constant by construction: the zeros below each row's
// offset, the two 1s of each later row's prefix, and the ECW bits between
// the negation bits. They are kept so that every row is a full 2N-bit word;
// synthesis removes them.
// Bits above 2N-1 are dropped: the product is taken modulo 2^(2N), which is
// exact because an N x N signed product always fits in 2N bits.
// The row offsets follow the radix-8 arrangement of the design's source, and
// the two prefixes are the ones its partial product waveforms show; the
// content of the correction word is this design's reading, since the source
// names that block without describing it.
//
// Purely combinational.
module pp_generator_r8
  import radix8_pkg::*;
#(
  parameter int unsigned N = 16,             // operand width
  localparam int unsigned G = num_groups(N), // number of rows
  localparam int unsigned P = 2 * N          // product width
) (
  input  logic [N-1:0]  a,          // multiplicand, two's complement
  input  booth_digit_t  digit [G],  // Booth digits of the multiplier
  output logic [P-1:0]  row   [G],  // aligned partial product rows
  output logic [P-1:0]  ecw         // correction word: neg_j at bit 3j
);

  localparam int unsigned W = row_width(N); // unaligned row width, N+2

  logic signed [W-1:0] m1, m2, m3, m4; // A, 2A, 3A, 4A
  logic [G-1:0]        neg;

  assign m1 = W'(signed'(a));
  assign m2 = m1 <<< 1;
  assign m4 = m1 <<< 2;
  assign m3 = m1 + m2;                 // hard multiple, one shared adder

  for (genvar j = 0; j < G; j++) begin : g_row
    logic [W-1:0] sel;   // |d_j| * A
    logic [W-1:0] pp;    // sign-applied row, one's complement when negative
    logic         s;     // sign of the row

    assign sel = ({W{digit[j].one}}   & m1) |
                 ({W{digit[j].two}}   & m2) |
                 ({W{digit[j].three}} & m3) |
                 ({W{digit[j].four}}  & m4);
    assign pp  = sel ^ {W{digit[j].neg}};
    assign s   = pp[W-1];
    assign neg[j] = digit[j].neg;

    if (j == 0) begin : g_first
      assign row[j] = P'({~s, s, s, s, pp});
    end else begin : g_next
      assign row[j] = P'({2'b11, ~s, pp}) << (3 * j);
    end
  end

  // Correction word: negation bit j at weight 2^(3j).
  always_comb begin
    ecw = '0;
    for (int j = 0; j < G; j++) ecw[3*j] = neg[j];
  end

endmodule
