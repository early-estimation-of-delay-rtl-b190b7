// Self-checking test of plus2: all eight inputs against (s + 2) mod 8.
module tb_plus2;
  logic [2:0] s, o;
  int checks = 0, failures = 0;

  plus2 dut (.s(s), .o(o));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      s = n[2:0];
      #1;
      checks++;
      if (int'(o) !== (n + 2) % 8) begin
        failures++;
        $display("FAIL s=%0d o=%0d", n, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
