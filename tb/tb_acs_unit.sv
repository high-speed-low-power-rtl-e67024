// tb_acs_unit: self-checking test of one add-compare-select unit.
//
// Random path metrics (within 64 of each other, but anywhere in the 8-bit
// range so that sums wrap) and random branch metrics. The reference adds in
// plain integers before any wrap: the smaller unwrapped sum must win (the
// first one on a tie), dec must name it and pm_new must equal it modulo 256.
module tb_acs_unit;
  logic [7:0] pm0, pm1, pm_new;
  logic [2:0] bm0, bm1;
  logic dec;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int base, a, b, s0, s1, exp_pm;
      bit exp_dec;
      base = int'($urandom_range(0, 255));
      a = base + int'($urandom_range(0, 63));
      b = base + int'($urandom_range(0, 63));
      if (t % 7 == 0) b = a;  // ties
      pm0 = 8'(a); pm1 = 8'(b);
      bm0 = 3'($urandom_range(0, 7)); bm1 = 3'($urandom_range(0, 7));
      if (t % 11 == 0) bm1 = bm0;
      s0 = a + int'(bm0); s1 = b + int'(bm1);
      exp_dec = (s1 < s0);
      exp_pm  = exp_dec ? s1 : s0;
      #1;
      checks++;
      if (dec !== exp_dec || pm_new !== 8'(exp_pm)) begin
        failures++;
        $display("FAIL pm0=%0d pm1=%0d bm0=%0d bm1=%0d dec=%b pm_new=%0d exp %b %0d",
                 a, b, bm0, bm1, dec, pm_new, exp_dec, exp_pm & 255);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
