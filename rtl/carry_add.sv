// Carry addition block: adds one carry bit to a 4-bit tens digit.
//
// An incrementer enabled by the carry: bit k is inverted when the carry and
// all lower input bits are one. As in the block's schematic, each output bit
// is a 2:1 multiplexer choosing between the input bit and its inverse, the
// selects coming from a short AND chain (cin, cin.x0, cin.x0.x1, ...).
// The converter uses two of these in series, adding C1 and then C2 to the
// tens contribution of the high bits. The sum never exceeds 9 for inputs in
// the converter's range, so no carry out is produced.
//
// Interface: x = tens digit, cin = carry, o = x + cin (mod 16).
// Timing: purely combinational.
// Follows the document's block.
module carry_add
  import bin2bcd_pkg::*;
(
  input  bcd_digit_t x,
  input  logic       cin,
  output bcd_digit_t o
);

  logic [3:0] flip;   // bit k toggles when cin and x[k-1:0] are all one

  always_comb begin
    flip[0] = cin;
    flip[1] = flip[0] & x[0];
    flip[2] = flip[1] & x[1];
    flip[3] = flip[2] & x[2];
    for (int k = 0; k < 4; k++) o[k] = flip[k] ? ~x[k] : x[k];
  end

endmodule
