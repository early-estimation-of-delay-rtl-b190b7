// Self-checking test of plus3: all eight inputs against (s + 3) mod 8.
module tb_plus3;
  logic [2:0] s, o;
  int checks = 0, failures = 0;

  plus3 dut (.s(s), .o(o));

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
      if (int'(o) !== (n + 3) % 8) begin
        failures++;
        $display("FAIL s=%0d o=%0d", n, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
