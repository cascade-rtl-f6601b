// tb_arith_unit: random self-check of the 16-digit arithmetic unit.
// Builds random 16-digit operands and checks, as 128-bit integers,
//   S + 16^16*(ol_out + sg*ml_out) = A + sg*(q*M + ml_in) + ol_in
// for multiply mode (M = B, or 2B + dbl_in - 16^16*dbl_out when every digit
// is doubled), the plain add/subtract identity, the zero flag and the
// single-digit-value detection on a least significant chip.
module tb_arith_unit;
  import cascade_pkg::*;
  localparam int ND = 16;

  digit6_t q;
  digit6_t [ND-1:0] a, b, s;
  logic [ND-1:0] dsel;
  logic mul, sub, lsd, zero, sdv_ok;
  logic signed [4:0] sdv_val;
  logic signed [1:0] dbl_in, dbl_out, ol_in, ol_out;
  logic signed [3:0] ml_in, ml_out;
  int checks = 0, failures = 0;

  arith_unit #(.ND(ND)) dut (.q, .a, .b, .double_sel(dsel), .mul_mode(mul), .sub, .lsd,
    .dbl_in, .dbl_out, .ml_in, .ml_out, .ol_in, .ol_out, .s, .zero, .sdv_ok, .sdv_val);

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction
  function automatic logic signed [127:0] val(input digit6_t [ND-1:0] d);
    logic signed [127:0] v = 0;
    for (int i = ND - 1; i >= 0; i--) v = v * 16 + 128'(dval(d[i]));
    return v;
  endfunction
  localparam logic signed [127:0] W = 128'sd1 << 64;   // 16^16

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] m, lhs, rhs;
    int sg, low;
    for (int it = 0; it < 3000; it++) begin
      for (int i = 0; i < ND; i++) begin a[i] = dmake(rnd(-10, 10)); b[i] = dmake(rnd(-10, 10)); end
      q = dmake(rnd(-10, 10));
      mul = 1'($urandom); sub = 1'($urandom); lsd = 1'($urandom);
      dsel = (mul && $urandom_range(0, 1) == 1) ? '1 : '0;
      dbl_in = 2'(rnd(-1, 1)); ol_in = 2'(rnd(-1, 1)); ml_in = 4'(rnd(-6, 6));
      if (!dsel[0]) dbl_in = 0;
      #1;
      sg  = sub ? -1 : 1;
      m   = dsel[0] ? 2 * val(b) + 128'(dbl_in) - W * 128'(dbl_out) : val(b);
      lhs = val(s) + W * (128'(ol_out) + (mul ? 128'(sg) * 128'(ml_out) : 0));
      rhs = val(a) + (mul ? 128'(sg) * (128'(dval(q)) * m + 128'(ml_in)) : 128'(sg) * m) + 128'(ol_in);
      check(lhs == rhs, $sformatf("identity it=%0d mul=%0d sub=%0d dbl=%0d", it, mul, sub, dsel[0]));
      check(zero == (val(s) == 0), "zero flag");
    end
    // zero and single digit values: A - A, A - (A -/+ small)
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < ND; i++) a[i] = dmake(rnd(-10, 10));
      b = a;
      if (it % 3 == 1) b[0] = dmake(dval(a[0]) > 0 ? dval(a[0]) - 1 : dval(a[0]) + 1);
      if (it % 3 == 2) begin b[1] = dmake(dval(a[1]) > 0 ? dval(a[1]) - 1 : dval(a[1]) + 1); end
      q = '0; mul = 0; sub = 1; lsd = 1; dsel = '0; dbl_in = 0; ol_in = 0; ml_in = 0;
      #1;
      low = int'(val(s));
      check(zero == (low == 0), "zero after subtract");
      check(sdv_ok == (low >= -10 && low <= 10), $sformatf("sdv value %0d", low));
      if (sdv_ok) check(int'(sdv_val) == low, "sdv value");
      lsd = 0; #1;
      check(sdv_ok == (low == 0), "sdv on a chip that is not least significant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
