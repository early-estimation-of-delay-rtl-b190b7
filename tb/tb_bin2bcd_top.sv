// End-to-end test of bin2bcd_top at its only configuration.
//
// 1. Every input 0..95 (all high-bit values 0..5 the converter is built for)
//    is converted and compared with tens = a / 10, ones = a % 10.
// 2. For each input the test works out, from the input alone, whether the
//    converter has to apply its first correction (C1: a mod 16 > 9) and its
//    second (C2: (a mod 16) mod 10 + 16*h mod 10 > 9), and counts them.
// 3. All 100 products of two BCD digits are converted, the use the
//    converter is made for, and the worked example 31 -> 0011 0001 is
//    checked on its own.
// Each mechanism must occur at least once, else a failure is counted: the
// first correction (C1), the second correction (C2), both in one
// conversion, and each of the six multiplexor selections (h = 0..5).
module tb_bin2bcd_top;
  logic [6:0] a;
  logic [7:0] z;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_both = 0;
  int n_h [6];

  bin2bcd_top dut (.a(a), .z(z));

  // Watchdog: the sweeps need far fewer time steps than this.
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert_and_check(input int n);
    a = 7'(n);
    #1;
    checks++;
    if (int'(z[7:4]) !== n / 10 || int'(z[3:0]) !== n % 10) begin
      failures++;
      $display("FAIL a=%0d got %0d%0d", n, z[7:4], z[3:0]);
    end
  endtask

  initial begin
    foreach (n_h[j]) n_h[j] = 0;

    // 1 and 2: exhaustive sweep over the supported range.
    for (int n = 0; n < 96; n++) begin
      bit exp_c1, exp_c2;
      convert_and_check(n);
      exp_c1 = (n % 16) > 9;
      exp_c2 = ((n % 16) % 10 + (16 * (n / 16)) % 10) > 9;
      if (exp_c1) n_c1++;
      if (exp_c2) n_c2++;
      if (exp_c1 && exp_c2) n_both++;
      n_h[n / 16]++;
    end

    // 3: all products of two BCD digits, then the worked example.
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        convert_and_check(x * y);
    a = 7'b0011111;
    #1;
    checks++;
    if (z !== 8'b0011_0001) begin
      failures++;
      $display("FAIL example 0011111 gave %b", z);
    end

    $display("mechanisms: C1=%0d C2=%0d both=%0d h0..h5=%0d %0d %0d %0d %0d %0d",
             n_c1, n_c2, n_both, n_h[0], n_h[1], n_h[2], n_h[3], n_h[4], n_h[5]);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_both == 0) begin
      failures++;
      $display("FAIL a carry mechanism never occurred");
    end
    foreach (n_h[j]) begin
      checks++;
      if (n_h[j] == 0) begin
        failures++;
        $display("FAIL multiplexor selection h=%0d never occurred", j);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
