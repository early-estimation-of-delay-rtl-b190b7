// Types shared by the binary to BCD converter blocks.
//
// The converter handles one BCD digit in two pieces: bit 0, which never needs
// arithmetic because every correction and every contribution added to the
// ones digit is even, and bits 3..1, which are carried around as a 3-bit
// "half digit" (the digit's value divided by two). Tens digits are carried
// as full 4-bit BCD digits.
package bin2bcd_pkg;

  // Bits 3..1 of a BCD digit (the digit value shifted right by one).
  typedef logic [2:0] half_digit_t;

  // A full 4-bit BCD digit.
  typedef logic [3:0] bcd_digit_t;

  // The three most significant bits a6..a4 of the 7-bit binary input.
  typedef logic [2:0] hsb_t;

endpackage
