// Multiplexor array: picks the ones-digit sum for the value of the high bits.
//
// The high bits h = a6..a4 add 16*h mod 10 to the ones digit, i.e. 0, 6, 2,
// 8, 4, 0 for h = 0..5, which in units of two (bits 3..1) is +0, +3, +1, +4,
// +2, +0. The array is a small tree of 3-bit 2:1 multiplexers, laid out as
// in the block's schematic:
//   first level, steered by a4:  +1 or +4, and +2 or +3
//   second level, steered by a5: the +1/+4 pair or the +2/+3 pair
//   last level, steered by ~a5 . ~(a4 xor a6), true for h = 000 and 101:
//   the unmodified p3..p1 or the tree's result.
// Which multiplexer input goes with which select value is fixed by the
// arithmetic (h = 010 needs +1, h = 011 needs +4, h = 100 needs +2,
// h = 001 needs +3).
//
// Interface: h = {a6, a5, a4}; p = p3..p1; p_plus1..p_plus4 = adder outputs;
// o = selected bits 3..1, fed to the second BCD correction.
// Timing: purely combinational.
// For h = 110 and 111, which products of BCD digits never produce, the
// tree passes +1 and +4; the result then is not a BCD conversion.
module mux_array
  import bin2bcd_pkg::*;
(
  input  hsb_t        h,
  input  half_digit_t p,
  input  half_digit_t p_plus1,
  input  half_digit_t p_plus2,
  input  half_digit_t p_plus3,
  input  half_digit_t p_plus4,
  output half_digit_t o
);

  half_digit_t m14, m23, m_tree;
  logic        pass;

  always_comb begin
    m14    = h[0] ? p_plus4 : p_plus1;
    m23    = h[0] ? p_plus3 : p_plus2;
    m_tree = h[1] ? m14 : m23;
    pass   = ~h[1] & ~(h[0] ^ h[2]);
    o      = pass ? p : m_tree;
  end

endmodule
