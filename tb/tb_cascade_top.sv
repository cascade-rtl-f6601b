// tb_cascade_top: end-to-end test of the whole system at its default size
// (4 arithmetic modules, 64-digit words, one-megaword memories). An external
// agent model speaks the four-phase message protocol; a 512-bit reference
// model in the testbench gives every expected value. It exercises CREATE,
// SAVE, RESTORE, ASSIM, NEG, ADD, SUB, MUL, COMPARE, SIGN, DIGITS, DESTROY,
// SETREG, GETREG and GC, checks that an addition takes the same number of
// cycles for short and long operands and that a multiplication costs a
// fixed number of cycles per non-zero multiplier digit, and makes each
// mechanism happen and counts it: futures, reuse of destroyed storage, destroy-after-use,
// garbage collection on allocation failure, overflow, skipped zero
// multiplier digits and single-digit-value detection.
module tb_cascade_top;
  import cascade_pkg::*;
  localparam int WD = 64;
  localparam int WATCHDOG = 2000000;
  logic clk = 0, rst = 1, req = 0, ack;
  logic [19:0] msg_in = '0, msg_out;
  logic ev_gc, ev_reuse, ev_future, ev_overflow, ev_mulskip, ev_sdv;
  int checks = 0, failures = 0;
  int n_gc = 0, n_reuse = 0, n_future = 0, n_overflow = 0, n_mulskip = 0, n_sdv = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_gc) n_gc <= n_gc + 1;
    if (ev_reuse) n_reuse <= n_reuse + 1;
    if (ev_future) n_future <= n_future + 1;
    if (ev_overflow) n_overflow <= n_overflow + 1;
    if (ev_mulskip) n_mulskip <= n_mulskip + 1;
    if (ev_sdv) n_sdv <= n_sdv + 1;
  end

  typedef logic signed [511:0] big_t;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ---- external agent: four-phase request and result cycles ----
  task automatic send(input logic [19:0] v);
    @(negedge clk); msg_in = v;
    @(negedge clk); req = 1;
    while (!ack) @(negedge clk);
    req = 0;
    while (ack) @(negedge clk);
  endtask

  task automatic recv(output logic [19:0] v);
    @(negedge clk); req = 1;
    while (!ack) @(negedge clk);
    v = msg_out;
    req = 0;
    while (ack) @(negedge clk);
  endtask

  function automatic logic [19:0] code(input msg_t m, input bit fut = 0, input bit des = 0);
    return {13'd0, des, fut, m};
  endfunction

  task automatic create(input int v, output logic [19:0] h);
    send(code(M_CREATE)); send(20'(v[31:16])); send(20'(v[15:0])); recv(h);
  endtask

  task automatic binop(input msg_t m, input logic [19:0] a, input logic [19:0] b,
                       output logic [19:0] h, input bit fut = 0, input bit des = 0);
    send(code(m, fut, des)); send(a); send(b); recv(h);
  endtask

  task automatic unop(input msg_t m, input logic [19:0] a, output logic [19:0] h,
                      input bit fut = 0, input bit des = 0);
    send(code(m, fut, des)); send(a); recv(h);
  endtask

  task automatic destroy(input logic [19:0] h);
    send(code(M_DESTROY)); send(h);
  endtask

  // SAVE: number of transfers, then 4 digit codes each, least significant first
  task automatic save(input logic [19:0] h, output big_t v, output int ntr);
    logic [19:0] t, n;
    big_t p = 1;
    v = 0;
    send(code(M_SAVE)); send(h); recv(n);
    ntr = int'(n);
    for (int k = 0; k < ntr; k++) begin
      recv(t);
      for (int j = 0; j < 4; j++) begin
        v = v + p * big_t'(int'(t[5*j +: 5]) - 10);
        p = p * 16;
      end
    end
  endtask

  // ASSIM: 16-bit two's complement chunks, least significant first
  task automatic assim(input logic [19:0] h, output big_t v);
    logic [19:0] t, n;
    v = 0;
    send(code(M_ASSIM)); send(h); recv(n);
    for (int k = 0; k < int'(n); k++) begin
      recv(t);
      if (k == int'(n) - 1) v = v + (big_t'(signed'(t[15:0])) <<< (16 * k));
      else                  v = v + (big_t'(t[15:0]) << (16 * k));
    end
  endtask

  // RESTORE: digits given as values, most significant group first
  task automatic restore(input int dig [], output logic [19:0] h);
    int n;
    logic [19:0] t;
    n = (dig.size() + 3) / 4;
    send(code(M_RESTORE)); send(20'(n));
    for (int k = n - 1; k >= 0; k--) begin
      for (int j = 0; j < 4; j++)
        t[5*j +: 5] = (4*k + j < dig.size()) ? 5'(dig[4*k + j] + 10) : 5'd10;
      send(t);
    end
    recv(h);
  endtask

  task automatic expect_val(input logic [19:0] h, input big_t e, input string what);
    big_t v;
    int n;
    save(h, v, n);
    check(v == e, $sformatf("%s: value %0d expected %0d", what, v, e));
  endtask

  function automatic int ndigits_of(input big_t v);
    // digits in the shortest signed-digit form is not unique; only the
    // bound is checked: |v| < 10.67*16^(n-1) needs at least n digits
    int n = 0;
    big_t a = (v < 0) ? -v : v;
    while (a != 0) begin a = a / 16; n++; end
    return n;
  endfunction

  cascade_top dut (.clk, .rst, .req, .ack, .msg_in, .msg_out,
                   .ev_gc, .ev_reuse, .ev_future, .ev_overflow, .ev_mulskip, .ev_sdv);
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] ha, hb, hc, hd, hr, t, t2, hx, hy;
    logic [19:0] hk [8];
    big_t va, vb, vc, vd, v, cap;
    int n, nd, hexd;
    longint c0, c_small, c_big;
    int dig [];

    cap = 1;
    for (int i = 0; i < WD; i++) cap = cap * 16;
    cap = (cap - 1) / 15 * 10;                  // largest magnitude a word holds

    repeat (3) @(posedge clk); rst <= 0;
    repeat (2) @(posedge clk);

    // ---- create and read back ----
    va = 123456789; vb = -987654;
    create(123456789, ha); create(-987654, hb);
    expect_val(ha, va, "create a");
    expect_val(hb, vb, "create b");
    create(32'h8000_0000, hc); expect_val(hc, -big_t'(64'd2147483648), "create most negative");

    // ---- add, subtract, negate, multiply ----
    c0 = cyc; binop(M_ADD, ha, hb, hc); c_small = cyc - c0;
    expect_val(hc, va + vb, "add");
    binop(M_SUB, ha, hb, hc); expect_val(hc, va - vb, "sub");
    binop(M_SUB, hb, ha, hc); expect_val(hc, vb - va, "sub reversed");
    unop(M_NEG, ha, hc); expect_val(hc, -va, "neg");
    binop(M_MUL, ha, hb, hc); vc = va * vb; expect_val(hc, vc, "mul");
    binop(M_MUL, hb, hb, hd); expect_val(hd, vb * vb, "mul negative by negative");
    vd = vc;
    if (vc * vc <= cap) begin
      binop(M_MUL, hc, hc, hd); vd = vc * vc; expect_val(hd, vd, "square of product");
    end else hd = hc;
    // addition time does not depend on the length of the operands
    c0 = cyc; binop(M_ADD, hd, hd, hr); c_big = cyc - c0;
    expect_val(hr, vd + vd, "add long operands");
    check(c_big == c_small, $sformatf("add cycles %0d vs %0d", c_big, c_small));
    // multiplication costs a fixed number of cycles per non-zero multiplier digit
    begin
      logic [19:0] hm [3];
      longint cm [3];
      create(5, hx);
      create(32'h7, hm[0]); create(32'h77, hm[1]); create(32'h777, hm[2]);
      binop(M_MUL, hm[0], hx, hy); destroy(hy);   // every timed result then reuses storage
      for (int k = 0; k < 3; k++) begin
        c0 = cyc; binop(M_MUL, hm[k], hx, hy); cm[k] = cyc - c0;
        expect_val(hy, big_t'(5 * (k == 0 ? 7 : k == 1 ? 119 : 1911)), "multiply by 7/77/777 hex");
        destroy(hy);
      end
      check(cm[1] > cm[0] && cm[2] - cm[1] == cm[1] - cm[0],
            $sformatf("mul cycles per digit %0d %0d %0d", cm[0], cm[1], cm[2]));
      destroy(hx); destroy(hm[0]); destroy(hm[1]); destroy(hm[2]);
    end

    // ---- compare, sign, digits ----
    binop(M_COMPARE, ha, hb, t); check(t == 20'd1, "compare greater");
    binop(M_COMPARE, hb, ha, t); check(t == 20'hFFFFF, "compare less");
    binop(M_COMPARE, ha, ha, t); check(t == 20'd0, "compare equal");
    unop(M_SIGN, hb, t); check(t == 20'hFFFFF, "sign negative");
    unop(M_SIGN, ha, t); check(t == 20'd1, "sign positive");
    send(code(M_DIGITS)); send(hd); recv(t); recv(t2);
    nd = int'({t[15:0], t2[15:0]});
    hexd = ndigits_of(vd);
    check(nd == hexd || nd == hexd + 1, $sformatf("digits %0d for %0d hex digits", nd, hexd));
    begin
      big_t vv; int ntr;
      save(hd, vv, ntr);
      check(ntr == (nd + 3) / 4, "SAVE transfer count");
    end

    // ---- two's complement conversion ----
    assim(hb, v); check(v == vb, $sformatf("assim %0d", v));
    assim(hd, v); check(v == vd, "assim long");

    // ---- restore a digit sequence ----
    dig = new[WD / 2];
    v = 0;
    for (int i = WD / 2 - 1; i >= 0; i--) begin
      dig[i] = int'($urandom_range(0, 20)) - 10;
    end
    for (int i = WD / 2 - 1; i >= 0; i--) v = v * 16 + big_t'(dig[i]);
    restore(dig, hr);
    expect_val(hr, v, "restore");

    // ---- future: the handle comes back before the sum is computed ----
    binop(M_ADD, ha, hb, hr, 1'b1, 1'b0);
    expect_val(hr, va + vb, "future result");

    // ---- single digit value / zero result ----
    binop(M_SUB, ha, ha, hr);
    expect_val(hr, 0, "zero result");
    unop(M_SIGN, hr, t); check(t == 20'd0, "sign of zero");
    send(code(M_DIGITS)); send(hr); recv(t); recv(t2);
    check({t[15:0], t2[15:0]} == 32'd0, "zero has no digits");

    // ---- destroy and immediate reuse ----
    create(5, hx); destroy(hx);
    n = n_reuse;
    create(7, hy);
    check(hy == hx, "destroyed handle reused");
    expect_val(hy, 7, "reused storage value");
    // destroy flag on an arithmetic message
    create(11, hx); create(13, hy);
    binop(M_ADD, hx, hy, hr, 1'b0, 1'b1);
    expect_val(hr, 24, "add with destroy");
    create(17, t);
    check(t == hy, "argument destroyed by the operation is reused");
    expect_val(t, 17, "value after reuse");
    check(n_reuse >= n + 2, "reuse events");

    // ---- unsupported operations ----
    binop(M_DIV, ha, hb, t); check(t == 20'hFFFFF, "DIV answers with the invalid handle");
    send(code(M_GETREG)); recv(t);
    check(t[17] == 1'b1 && t[19] == 1'b0, "unsupported flag set, no overflow yet");

    // ---- overflow: square until the word is too short ----
    create(2147483647, hr); v = 2147483647;
    while (v * v <= cap) begin
      binop(M_MUL, hr, hr, hr); v = v * v;
      expect_val(hr, v, "repeated square");
    end
    check(n_overflow == 0, "no overflow while the product fits");
    binop(M_MUL, hr, hr, t);
    send(code(M_GETREG)); recv(t);
    check(t[19] == 1'b1 && n_overflow > 0, "overflow flagged");

    // ---- small memory: allocation failure runs the garbage collector ----
    send(code(M_SETREG)); send({10'd0, 5'd6, 5'd3});   // 64 management, 8 digit words
    send(code(M_GETREG)); recv(t);
    check(t[9:0] == {5'd6, 5'd3}, "setup register");
    for (int k = 0; k < 8; k++) create(1000 * k - 3000, hk[k]);
    for (int k = 0; k < 8; k++) expect_val(hk[k], big_t'(1000 * k - 3000), "filled memory");
    destroy(hk[1]); destroy(hk[3]); destroy(hk[5]);
    create(42, t);  check(t == hk[5], "reuse before collecting");
    n = n_gc;
    create(43, hx); check(hx != 20'hFFFFF && n_gc == n + 1, "allocation after garbage collection");
    create(44, hy); check(hy != 20'hFFFFF, "second freed word");
    create(45, t);  check(t == 20'hFFFFF, "memory exhausted");
    send(code(M_GETREG)); recv(t2); check(t2[18] == 1'b1, "out of memory flag");
    for (int k = 0; k < 8; k++)
      if (k != 1 && k != 3 && k != 5) expect_val(hk[k], big_t'(1000 * k - 3000), "survived compaction");
    expect_val(hk[5], 42, "reused survived"); expect_val(hx, 43, "new 43"); expect_val(hy, 44, "new 44");
    destroy(hk[0]); destroy(hk[7]);
    send(code(M_GC));
    for (int k = 2; k < 7; k += 2) expect_val(hk[k], big_t'(1000 * k - 3000), "after explicit GC");
    expect_val(hx, 43, "43 after explicit GC");
    create(46, t); create(47, t2);
    check(t != 20'hFFFFF && t2 != 20'hFFFFF, "space after explicit GC");
    expect_val(t, 46, "value after explicit GC");
    expect_val(t2, 47, "value after explicit GC");
    destroy(hk[2]);
    binop(M_ADD, t, t2, hr); expect_val(hr, 93, "arithmetic after GC");
    check(hr == hk[2], "result reuses the destroyed number's storage");

    $display("events: gc=%0d reuse=%0d future=%0d overflow=%0d mulskip=%0d sdv=%0d",
             n_gc, n_reuse, n_future, n_overflow, n_mulskip, n_sdv);
    check(n_gc > 0, "garbage collection happened");
    check(n_reuse > 0, "storage reuse happened");
    check(n_future > 0, "future happened");
    check(n_overflow > 0, "overflow happened");
    check(n_mulskip > 0, "zero multiplier digit skipped");
    check(n_sdv > 0, "single digit value detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
