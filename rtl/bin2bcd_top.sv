// 7-bit binary to two-digit BCD converter for decimal multiplication.
//
// A decimal multiplier that multiplies BCD digits in binary gets products
// 0..81 as 7-bit binary numbers and must turn each back into two BCD digits.
// This converter does that in a fixed, shallow network with no iteration:
//
//   * z0 = a0 untouched: everything added to the ones digit is even.
//   * The low nibble a3..a0 already has BCD weights. Carry C1 flags a nibble
//     above 9; the first BCD correction then adds 6, giving p3..p1, and C1
//     goes to the tens digit.
//   * The high bits h = a6..a4 (weight 16*h) add a fixed tens share t3..t0
//     (contribution generator) and a fixed even ones share (0, 6, 2, 8, 4, 0
//     for h = 0..5). The ones share is added by four constant adders +1..+4
//     on p3..p1 in parallel; the multiplexor array, steered by h, picks one.
//   * Carry C2, computed straight from a6..a1, flags a ones sum above 9; the
//     second BCD correction adds 6 and C2 goes to the tens digit.
//   * Two carry addition blocks add C1 and then C2 to t3..t0: z7..z4.
//
// Interface: a = a6..a0 binary input, z = z7..z0, tens digit z7..z4 and ones
// digit z3..z0. Correct for every a with a6..a4 <= 101 (0..95), which
// covers all products of two BCD digits; 96..127 give no meaningful output.
// Timing: purely combinational, no clock.
// The structure is the document's; the logic of the carry generation block
// and the tens equation t2 are this design's (see those modules).
module bin2bcd_top
  import bin2bcd_pkg::*;
(
  input  logic [6:0] a,
  output logic [7:0] z
);

  logic        c1, c2;
  bcd_digit_t  t, tens_c1;
  half_digit_t p, p1, p2, p3, p4, sel;

  carry_c1    u_c1     (.a3_1(a[3:1]), .c1(c1));
  bcd_correct u_corr1  (.i(a[3:1]), .overflow(c1), .o(p));
  contrib_gen u_contr  (.h(a[6:4]), .t(t));
  carry_add   u_add_c1 (.x(t), .cin(c1), .o(tens_c1));
  carry_c2    u_c2     (.a6_1(a[6:1]), .c2(c2));

  plus1       u_plus1  (.s(p), .o(p1));
  plus2       u_plus2  (.s(p), .o(p2));
  plus3       u_plus3  (.s(p), .o(p3));
  plus4       u_plus4  (.s(p), .o(p4));

  mux_array   u_mux    (.h(a[6:4]), .p(p), .p_plus1(p1), .p_plus2(p2),
                        .p_plus3(p3), .p_plus4(p4), .o(sel));

  bcd_correct u_corr2  (.i(sel), .overflow(c2), .o(z[3:1]));
  carry_add   u_add_c2 (.x(tens_c1), .cin(c2), .o(z[7:4]));

  assign z[0] = a[0];

endmodule
