// Self-checking test of carry_c1: every value of a3..a1 against the rule
// "low nibble a3..a0 above 9", evaluated for both values of a0.
module tb_carry_c1;
  logic [2:0] a3_1;
  logic       c1;
  int checks = 0, failures = 0;

  carry_c1 dut (.a3_1(a3_1), .c1(c1));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      a3_1 = n[3:1];
      #1;
      checks++;
      if (c1 !== (n > 9)) begin
        failures++;
        $display("FAIL nibble=%0d c1=%b", n, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
