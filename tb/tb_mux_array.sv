// Self-checking test of mux_array. The five data inputs get random, distinct
// tags; for each h = 0..5 the output must be the input that carries the ones
// share of 16*h: p for 0 and 80, p+3 for 16, p+1 for 32, p+4 for 48, p+2
// for 64 (shares 6, 2, 8, 4 in units of two).
module tb_mux_array;
  logic [2:0] h, p, q1, q2, q3, q4, o;
  int checks = 0, failures = 0;

  mux_array dut (.h(h), .p(p), .p_plus1(q1), .p_plus2(q2), .p_plus3(q3),
                 .p_plus4(q4), .o(o));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      automatic logic [2:0] tags [5];
      // Five distinct 3-bit tags from a random rotation of 0..7.
      automatic int base = $urandom_range(7);
      for (int j = 0; j < 5; j++) tags[j] = 3'((base + 3 * j) % 8);
      {p, q1, q2, q3, q4} = {tags[0], tags[1], tags[2], tags[3], tags[4]};
      for (int n = 0; n <= 5; n++) begin
        int share;
        logic [2:0] exp_o;
        h = n[2:0];
        share = ((16 * n) % 10) / 2;
        exp_o = tags[share];
        #1;
        checks++;
        if (o !== exp_o) begin
          failures++;
          $display("FAIL h=%0d o=%0d exp=%0d", n, o, exp_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
