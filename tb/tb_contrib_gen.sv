// Self-checking test of contrib_gen: for h = 0..5 the output must be the
// tens digit of 16*h.
module tb_contrib_gen;
  logic [2:0] h;
  logic [3:0] t;
  int checks = 0, failures = 0;

  contrib_gen dut (.h(h), .t(t));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 5; n++) begin
      h = n[2:0];
      #1;
      checks++;
      if (int'(t) !== (16 * n) / 10) begin
        failures++;
        $display("FAIL h=%0d t=%0d exp=%0d", n, t, (16 * n) / 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
