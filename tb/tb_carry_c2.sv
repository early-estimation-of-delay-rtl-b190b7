// Self-checking test of carry_c2: for every input 0..95 (high bits 0..5),
// C2 must be set exactly when (a mod 16) mod 10 plus 16*h mod 10 exceeds 9.
module tb_carry_c2;
  logic [5:0] a6_1;
  logic       c2;
  int checks = 0, failures = 0;

  carry_c2 dut (.a6_1(a6_1), .c2(c2));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 96; n++) begin
      int ones;
      a6_1 = n[6:1];
      ones = (n % 16) % 10 + (16 * (n / 16)) % 10;
      #1;
      checks++;
      if (c2 !== (ones > 9)) begin
        failures++;
        $display("FAIL a=%0d c2=%b ones=%0d", n, c2, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
