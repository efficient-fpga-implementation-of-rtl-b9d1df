// Radix-8 modified Booth multiplier, N x N bits, two's complement.
//
// The multiplier operand B is recoded by booth_encoder_r8 into
// G = ceil(N/3) digits in -4..+4: 6 partial products for N = 16, against 8
// for radix-4 Booth recoding. pp_generator_r8 turns each digit into a row
// (0, +-A, +-2A, +-3A, +-4A, shifted by 3j bits, with a short sign prefix
// instead of sign extension) and gathers the rows' negation bits into one
// correction word (ECW). wallace_adder sums the G+1 rows with a carry-save
// tree and one final carry-propagate adder.
//
// Interface: a, b in, p = a * b out, 2N bits, all two's complement.
// Timing: purely combinational, no clock; results are valid as soon as the
// inputs have settled. The four-part split (encoder, generator, correction
// word, adder) follows the design's source; the signed operands, the content
// of the correction word and the word-level tree are this design's choices.
module radix8_multiplier
  import radix8_pkg::*;
#(
  parameter int unsigned N = 16,             // operand width
  localparam int unsigned G = num_groups(N), // Booth digits / rows
  localparam int unsigned P = 2 * N          // product width
) (
  input  logic [N-1:0] a, // multiplicand
  input  logic [N-1:0] b, // multiplier (Booth-recoded)
  output logic [P-1:0] p  // product a * b
);

  booth_digit_t digit [G];
  logic [P-1:0] pp_rows [G];
  logic [P-1:0] adder_rows [G+1];
  logic [P-1:0] ecw;

  booth_encoder_r8 #(.N(N)) u_enc (
    .b     (b),
    .digit (digit)
  );

  pp_generator_r8 #(.N(N)) u_ppg (
    .a        (a),
    .digit    (digit),
    .row      (pp_rows),
    .ecw      (ecw)
  );

  for (genvar j = 0; j < G; j++) begin : g_rows
    assign adder_rows[j] = pp_rows[j];
  end
  assign adder_rows[G] = ecw;

  wallace_adder #(.ROWS(G + 1), .W(P)) u_add (
    .rows (adder_rows),
    .sum  (p)
  );

endmodule
