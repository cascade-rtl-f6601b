// tb_norm_sensor: exhaustive check of the normalization sensor over all
// 21^3 combinations of the three most significant digits, against the
// magnitude of the three-digit estimate taken as a fraction (top digit
// weight 1/16): radix-r normalized when the magnitude is at least 1/(2r).
module tb_norm_sensor;
  import cascade_pkg::*;
  digit6_t d2, d1, d0;
  logic n16, n4, n2;
  int checks = 0, failures = 0;

  norm_sensor dut (.d2, .d1, .d0, .n16, .n4, .n2);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real f;
    for (int x = -10; x <= 10; x++)
      for (int y = -10; y <= 10; y++)
        for (int z = -10; z <= 10; z++) begin
          d2 = dmake(x); d1 = dmake(y); d0 = dmake(z);
          #1;
          f = (x / 16.0) + (y / 256.0) + (z / 4096.0);
          if (f < 0) f = -f;
          checks++;
          if (n16 != (f >= 1.0 / 32) || n4 != (f >= 1.0 / 8) || n2 != (f >= 1.0 / 4)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d %0d %0d -> %b%b%b", x, y, z, n16, n4, n2);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
