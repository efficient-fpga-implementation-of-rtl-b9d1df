// Shared types and sizing functions of the radix-8 Booth multiplier family.
//
// A radix-8 Booth digit takes a value in -4..+4. It is carried between the
// encoder and the partial product generator as a sign flag plus one-hot
// magnitude selects (1, 2, 3 or 4 times the multiplicand; all selects low
// means zero). The one-hot form lets the generator pick a multiple with a
// simple AND-OR, which is the usual encoder/decoder split of a Booth
// multiplier; the exact encoding is this design's choice.
package radix8_pkg;

  typedef struct packed {
    logic neg;   // digit is negative: the selected multiple is inverted
    logic one;   // |digit| == 1
    logic two;   // |digit| == 2
    logic three; // |digit| == 3 (the "hard" multiple 3A)
    logic four;  // |digit| == 4
  } booth_digit_t;

  // Number of radix-8 digits (and partial product rows) for an n-bit signed
  // multiplier: each digit retires three bits, so ceil(n/3). 16 bits -> 6.
  function automatic int unsigned num_groups(int unsigned n);
    return (n + 2) / 3;
  endfunction

  // Width of one partial product row before alignment: |digit| * A needs
  // up to n+2 bits as a signed number (4 * A, two bits of growth).
  function automatic int unsigned row_width(int unsigned n);
    return n + 2;
  endfunction

endpackage
