// Carry generation block: carry C2 out of the ones digit.
//
// After the first correction the ones digit is L' = (a3..a0 mod 10), and the
// high bits h = a6..a4 still add their ones share 16*h mod 10 to it. C2 is
// high when that sum exceeds 9; it enables the second BCD correction and is
// added to the tens digit. Every term involved except a0 is even and a0 can
// not push an even sum across 10, so C2 only needs a6..a1:
//   u  = a3..a1                        (0..7, half the low nibble)
//   p  = u - 5 if u >= 5, else u       (half of L')
//   k  = 0, 3, 1, 4, 2, 0 for h = 0..5 (half of 16*h mod 10)
//   C2 = (p + k >= 5)
// The block works straight from the input bits, in parallel with the first
// correction and the adders, so C2 is not on the path through them.
//
// Interface: a6_1 = {a6, a5, a4, a3, a2, a1}; c2 = carry.
// Timing: purely combinational.
// The document gives this block's inputs and purpose but not its logic;
// the comparison above is this design's own, the simplest that does the
// job. h = 6 and 7 are given k = 3 and 1 (16*h mod 10 again).
module carry_c2
  import bin2bcd_pkg::*;
(
  input  logic [5:0] a6_1,
  output logic       c2
);

  hsb_t       h;
  logic [2:0] u, p, k;

  always_comb begin
    h = a6_1[5:3];
    u = a6_1[2:0];
    p = (u >= 3'd5) ? u - 3'd5 : u;
    unique case (h)
      3'd1, 3'd6: k = 3'd3;
      3'd2, 3'd7: k = 3'd1;
      3'd3:       k = 3'd4;
      3'd4:       k = 3'd2;
      default:    k = 3'd0;
    endcase
    c2 = ({1'b0, p} + {1'b0, k}) >= 4'd5;
  end

endmodule
