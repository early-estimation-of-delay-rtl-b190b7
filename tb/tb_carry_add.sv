// Self-checking test of carry_add: all 16 digits times both carry values
// against x + cin modulo 16.
module tb_carry_add;
  logic [3:0] x, o;
  logic       cin;
  int checks = 0, failures = 0;

  carry_add dut (.x(x), .cin(cin), .o(o));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < 16; n++) begin
        x = n[3:0];
        cin = c[0];
        #1;
        checks++;
        if (int'(o) !== (n + c) % 16) begin
          failures++;
          $display("FAIL x=%0d cin=%0d o=%0d", n, c, o);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
