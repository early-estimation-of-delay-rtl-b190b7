// +3 block: adds 3 modulo 8 to the corrected low bits p3..p1.
//
// p3..p1 are bits 3..1 of the corrected ones digit, so adding 3 here adds
// 6 to the ones digit. The high bits a6..a4 contribute a fixed, even amount
// to the ones digit (16*h mod 10); the four adders +1..+4 produce all the
// needed sums in parallel and the multiplexor array picks one. Any wrap past
// 7 is harmless: the following BCD correction adds 3 modulo 8, which only
// depends on the sum modulo 8, and carry C2 is computed on its own.
// Gates: bit 1 is inverted, bit 2 toggles when bit 1 is clear, bit 3 toggles
// when bit 2 or bit 1 is set (an OR steering a 2:1 multiplexer).
//
// Interface: s = p3..p1, o = (s + 3) mod 8.
// Timing: purely combinational.
// Follows the document's gate schematic of the block.
module plus3
  import bin2bcd_pkg::*;
(
  input  half_digit_t s,
  output half_digit_t o
);

  always_comb begin
    o[0] = ~s[0];
    o[1] = s[0] ? s[1] : ~s[1];
    o[2] = (s[1] | s[0]) ? ~s[2] : s[2];
  end

endmodule
