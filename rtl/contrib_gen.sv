// Generation of contribution: the tens-digit share of the three high bits.
//
// The high bits a6..a4 weigh 16*h. For the products of two BCD digits
// (0..81) h only takes the values 0..5, i.e. 0, 16, 32, 48, 64 and 80, whose
// tens digits are 0, 1, 3, 4, 6 and 8. Using h = 6 and 7 as don't-cares the
// four tens bits reduce to
//   t0 = ~a6 ~a5 a4 + a5 ~a4
//   t1 = (a6 + a5) ~a4
//   t2 = a5 a4 + a6 ~a4
//   t3 = a6 a4
// (the ones-digit share of h is produced separately by the +1..+4 adders
// and the multiplexor array).
//
// Interface: h = {a6, a5, a4}; t = tens contribution t3..t0.
// Timing: purely combinational.
// t0, t1 and t3 follow the document's equations. The document's form of t2
// also draws on a3, which the tens share of h does not depend on; the t2
// here is derived from the table above instead, a choice of this design,
// and a3 is not an input of this block.
module contrib_gen
  import bin2bcd_pkg::*;
(
  input  hsb_t       h,
  output bcd_digit_t t
);

  logic a6, a5, a4;

  always_comb begin
    {a6, a5, a4} = h;
    t[0] = (~a6 & ~a5 & a4) | (a5 & ~a4);
    t[1] = (a6 | a5) & ~a4;
    t[2] = (a5 & a4) | (a6 & ~a4);
    t[3] = a6 & a4;
  end

endmodule
