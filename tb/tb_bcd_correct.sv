// Self-checking test of bcd_correct: for every 4-bit digit d (bit 0 passed
// around the block) and both overflow values, bits 3..1 of the output must
// equal those of d + 6 (mod 16) when overflow is set and of d otherwise.
module tb_bcd_correct;
  logic [2:0] i, o;
  logic       overflow;
  int checks = 0, failures = 0;

  bcd_correct dut (.i(i), .overflow(overflow), .o(o));

  // Watchdog: the sweep needs far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ov = 0; ov < 2; ov++)
      for (int d = 0; d < 16; d++) begin
        automatic int exp_d;
        i = d[3:1];
        overflow = ov[0];
        exp_d = (ov != 0) ? (d + 6) % 16 : d;
        #1;
        checks++;
        if ({o, d[0]} !== exp_d[3:0]) begin
          failures++;
          $display("FAIL d=%0d ov=%0d got=%0d exp=%0d", d, ov, {o, d[0]}, exp_d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
