// Radix-8 modified Booth encoder.
//
// The N-bit two's complement multiplier B gets a zero appended below its
// LSB and is sign-extended at the top to 3*G+1 bits, G = ceil(N/3). It is
// then cut into G overlapping 4-bit groups {b[3j+2], b[3j+1], b[3j], b[3j-1]}
// (neighbouring groups share one bit), and each group is recoded into a digit
// d_j in -4..+4 following the standard radix-8 table:
//
//   0000 -> 0   0001,0010 -> +1   0011,0100 -> +2   0101,0110 -> +3
//   0111 -> +4  1000 -> -4        1001,1010 -> -3   1011,1100 -> -2
//   1101,1110 -> -1               1111 -> 0
//
// so that B = sum_j d_j * 8^j. The grouping, the appended zero and the table
// follow the radix-8 Booth scheme; sign extension of B for the top group and
// the one-hot output form (see radix8_pkg) are this design's choices. 1111
// is encoded as a plain zero (neg low), so a zero digit never produces a
// correction bit.
//
// Purely combinational; no clock.
module booth_encoder_r8
  import radix8_pkg::*;
#(
  parameter int unsigned N = 16,            // multiplier width in bits
  localparam int unsigned G = num_groups(N) // number of Booth digits
) (
  input  logic [N-1:0]  b,         // multiplier, two's complement
  output booth_digit_t  digit [G]  // Booth digit j has weight 8^j
);

  localparam int unsigned EXT = 3 * G + 1; // extended multiplier width

  logic [EXT-1:0] b_ext;

  // Sign-extend B to 3G bits and append the zero below the LSB.
  assign b_ext = {{(EXT - N - 1){b[N-1]}}, b, 1'b0};

  for (genvar j = 0; j < G; j++) begin : g_digit
    logic [3:0] grp;
    assign grp = b_ext[3*j +: 4];

    always_comb begin
      digit[j] = '0;
      unique case (grp)
        4'b0000, 4'b1111: ;                                      // 0
        4'b0001, 4'b0010: digit[j].one   = 1'b1;                 // +1
        4'b0011, 4'b0100: digit[j].two   = 1'b1;                 // +2
        4'b0101, 4'b0110: digit[j].three = 1'b1;                 // +3
        4'b0111:          digit[j].four  = 1'b1;                 // +4
        4'b1000:          digit[j] = '{neg: 1'b1, four: 1'b1, default: 1'b0};
        4'b1001, 4'b1010: digit[j] = '{neg: 1'b1, three: 1'b1, default: 1'b0};
        4'b1011, 4'b1100: digit[j] = '{neg: 1'b1, two: 1'b1, default: 1'b0};
        4'b1101, 4'b1110: digit[j] = '{neg: 1'b1, one: 1'b1, default: 1'b0};
        default: ;
      endcase
    end
  end

endmodule
