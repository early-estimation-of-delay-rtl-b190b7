// BCD correction block: adds (0110)2 to a digit when the overflow input is high.
//
// Adding six to a 4-bit digit leaves bit 0 alone and adds three to bits 3..1,
// so the block only sees bits 3..1 and works modulo 8 (the carry out of bit
// 3 is the carry that the caller already knows and forwards to the tens
// digit). The +3 is built like the gate schematic of the block: bit 1 is
// inverted, bit 2 is inverted or not depending on bit 1, bit 3 is inverted or
// not depending on (bit 2 OR bit 1); a final row of 2:1 multiplexers, steered
// by overflow, chooses between the corrected and the original bits.
//
// Interface: i = digit bits 3..1, overflow = correction enable (C1 or C2),
// o = digit bits 3..1 after correction.
// Timing: purely combinational.
// Follows the document's block; the 3-bit port grouping is this design's.
module bcd_correct
  import bin2bcd_pkg::*;
(
  input  half_digit_t i,
  input  logic        overflow,
  output half_digit_t o
);

  half_digit_t plus3;

  always_comb begin
    plus3[0] = ~i[0];
    plus3[1] = i[0] ? i[1] : ~i[1];
    plus3[2] = (i[1] | i[0]) ? ~i[2] : i[2];
    o        = overflow ? plus3 : i;
  end

endmodule
