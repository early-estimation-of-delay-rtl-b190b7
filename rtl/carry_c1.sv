// Carry C1: flags a low nibble a3..a0 that is not a valid BCD digit.
//
// The low four bits of the binary input already carry BCD weights, so they
// form the ones digit directly unless their value exceeds 9. Values 10..15
// all have a3 set together with a2 or a1, hence C1 = (a2 + a1) . a3, one OR
// and one AND gate. a0 plays no part. C1 both enables the first BCD
// correction and is added to the tens digit.
//
// Interface: a3_1 = {a3, a2, a1}; c1 is the carry.
// Timing: purely combinational.
// The equation is the one the converter is defined with; nothing here is an
// own choice.
module carry_c1 (
  input  logic [2:0] a3_1,
  output logic       c1
);

  always_comb c1 = (a3_1[1] | a3_1[0]) & a3_1[2];

endmodule
