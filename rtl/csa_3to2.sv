// Word-wide 3:2 carry-save adder: a row of independent full adders.
//
// Reduces three W-bit operands x, y, z to a sum word s and a carry word c
// with x + y + z == s + c (mod 2^W). The carries are already shifted one
// place left; the carry out of the top bit is dropped. Building block of the
// Wallace tree in wallace_adder. Purely combinational.
module csa_3to2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-2:0] maj; // carries of bits 0..W-2; the top carry is discarded

  assign s   = x ^ y ^ z;
  assign maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) |
               (y[W-2:0] & z[W-2:0]);
  assign c   = {maj, 1'b0};

endmodule
