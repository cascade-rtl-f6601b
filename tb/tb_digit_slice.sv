// tb_digit_slice: random self-check of one radix-16 signed-digit slice.
// For random operand digits, modes and incoming transfers it checks the
// arithmetic identity the slice must keep,
//   s + 16*ol_out + sg*16*ml_out = a + sg*(q*M + ml_in) + ol_in   (multiply)
//   s + 16*ol_out                = a + sg*M + ol_in               (add)
// with sg = -1 when subtracting and M = b, or 2b + dbl_in - 16*dbl_out when
// doubling, and that every output lies in its digit set.
module tb_digit_slice;
  import cascade_pkg::*;

  digit6_t q, b, a, s;
  logic dbl, mul, sub;
  logic signed [1:0] dbl_in, dbl_out, ol_in, ol_out;
  logic signed [3:0] ml_in, ml_out;
  int checks = 0, failures = 0;

  digit_slice dut (.q, .b, .a, .double_sel(dbl), .mul_mode(mul), .sub,
                   .dbl_in, .dbl_out, .ml_in, .ml_out, .ol_in, .ol_out, .s);

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, lhs, rhs, sg;
    for (int it = 0; it < 20000; it++) begin
      q = dmake(rnd(-10, 10)); b = dmake(rnd(-10, 10)); a = dmake(rnd(-10, 10));
      dbl = 1'($urandom); mul = 1'($urandom); sub = 1'($urandom);
      dbl_in = 2'(rnd(-1, 1)); ol_in = 2'(rnd(-1, 1)); ml_in = 4'(rnd(-6, 6));
      if (it == 0) begin   // extreme corner
        q = dmake(10); b = dmake(10); a = dmake(10); dbl = 1; mul = 1; sub = 0;
        dbl_in = 1; ol_in = 1; ml_in = 6;
      end
      #1;
      sg  = sub ? -1 : 1;
      m   = dbl ? 2 * dval(b) + int'(dbl_in) - 16 * int'(dbl_out) : dval(b);
      lhs = dval(s) + 16 * int'(ol_out) + (mul ? sg * 16 * int'(ml_out) : 0);
      rhs = dval(a) + (mul ? sg * (dval(q) * m + int'(ml_in)) : sg * m) + int'(ol_in);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d b=%0d a=%0d dbl=%0d mul=%0d sub=%0d: %0d != %0d",
                                    dval(q), dval(b), dval(a), dbl, mul, sub, lhs, rhs);
      end
      checks++;
      if (dval(s) < -10 || dval(s) > 10 || s.hi < -2 || s.hi > 2 || s.lo < -2 || s.lo > 2 ||
          ml_out < -6 || ml_out > 6 || ol_out == -2 || dbl_out == -2 ||
          (dbl && (m < -10 || m > 10)) || (!dbl && dbl_out != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL range s=%0d ml_out=%0d ol_out=%0d m=%0d", dval(s), ml_out, ol_out, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
