// tb_arith_chip: drives one arithmetic chip (both most and least significant)
// with broadcast instructions and a digit memory modelled in the testbench.
// Every register value is read back through STORE and the memory bus, and
// each operation is checked as an identity on 16-digit integers, including
// the transfer digits and shift-path digits leaving the chip: LOAD/STORE,
// ADD, SUB, MULADD, MULSUB, whole and half digit shifts in both directions
// on one and on both shift paths, sign and leading-zero sensing, the
// normalization sensor, single-digit-value and zero detection, the store of
// the arithmetic unit output straight to memory, and a square-root step
// with the root digit position register.
module tb_arith_chip;
  import cascade_pkg::*;
  localparam int ND = 16;
  localparam logic signed [127:0] W = 128'sd1 << 64;

  logic clk = 0, rst = 1, strobe = 0;
  logic [9:0] instr = '0;
  logic [79:0] mem_rdata = '0, mem_wdata;
  logic mem_drive;
  digit6_t sp0_l_in = '0, sp0_l_out, sp0_r_in = '0, sp0_r_out;
  digit6_t sp1_l_in = '0, sp1_l_out, sp1_r_in = '0, sp1_r_out;
  logic signed [1:0] dbl_out, ol_out;
  logic signed [3:0] ml_out;
  sign_t sign_out;
  logic [4:0] lz;
  logic [2:0] norm;
  logic dp_out, rdp_l_out, sdv_ok, zero;
  logic signed [4:0] sdv_val;
  int checks = 0, failures = 0;

  arith_chip dut (
    .clk, .rst, .strobe, .instr, .msd(1'b1), .lsd(1'b1),
    .mem_rdata, .mem_wdata, .mem_drive,
    .sp0_l_in, .sp0_l_out, .sp0_r_in, .sp0_r_out, .sp1_l_in, .sp1_l_out, .sp1_r_in, .sp1_r_out,
    .dbl_in(2'sd0), .dbl_out, .ml_in(4'sd0), .ml_out, .ol_in(2'sd0), .ol_out,
    .sign_in(SGN_ZERO), .sign_out, .lz, .norm,
    .dp_in(1'b1), .dp_out, .rdp_r_in(1'b0), .rdp_l_out,
    .sdv_ok, .sdv_val, .zero);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic signed [127:0] wval(input logic [79:0] w);
    logic signed [127:0] v = 0;
    for (int i = ND - 1; i >= 0; i--) v = v * 16 + 128'(int'(w[5*i +: 5]) - 10);
    return v;
  endfunction

  function automatic logic [79:0] rand_word(input int top);
    logic [79:0] w;
    for (int i = 0; i < ND; i++) w[5*i +: 5] = (i < top) ? 5'($urandom_range(0, 20)) : 5'd10;
    return w;
  endfunction

  // apply one instruction for one strobed cycle
  task automatic issue(input iop_t o, input logic [5:0] f);
    @(negedge clk); instr = {o, f}; strobe = 1;
    @(negedge clk); strobe = 0; instr = '0;
  endtask

  // read register r as an integer through the memory bus
  task automatic rd(input logic [1:0] r, output logic signed [127:0] v);
    @(negedge clk); instr = {I_STORE, 4'd0, r}; strobe = 1; #1;
    check(mem_drive == 1'b1, "mem_drive on STORE");
    v = wval(mem_wdata);
    @(negedge clk); strobe = 0; instr = '0;
  endtask

  task automatic ld(input logic [1:0] r, input logic [79:0] w);
    mem_rdata = w;
    issue(I_LOAD, {4'd0, r});
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [79:0] w0, w1;
    logic signed [127:0] v0, v1, v2, v3, e;
    logic signed [1:0] olc;
    logic signed [3:0] mlc;
    logic signed [1:0] dlc;
    digit6_t outd, outd1;
    int q, x, sg;
    repeat (2) @(posedge clk); rst <= 0;

    for (int it = 0; it < 60; it++) begin
      w0 = rand_word($urandom_range(1, 16)); w1 = rand_word($urandom_range(1, 16));
      ld(2'd0, w0); ld(2'd1, w1);
      rd(2'd0, v0); rd(2'd1, v1);
      check(v0 == wval(w0) && v1 == wval(w1), "load/store round trip");

      // add and subtract: sample the transfer leaving the chip
      for (int s = 0; s < 2; s++) begin
        @(negedge clk); instr = {(s == 0) ? I_ADD : I_SUB, 6'b10_00_01}; strobe = 1; #1;
        olc = ol_out;
        @(negedge clk); strobe = 0; instr = '0;
        rd(2'd2, v2);
        e = (s == 0) ? v0 + v1 : v0 - v1;
        check(v2 + W * 128'(olc) == e, $sformatf("add/sub %0d", s));
      end

      // multiply-add and multiply-subtract with a broadcast digit
      q = $urandom_range(0, 20) - 10;
      issue(I_SETMPD, {1'b0, 5'(q + 10)});
      for (int s = 0; s < 2; s++) begin
        @(negedge clk); instr = {(s == 0) ? I_MULADD : I_MULSUB, 6'b11_00_01}; strobe = 1; #1;
        olc = ol_out; mlc = ml_out;
        @(negedge clk); strobe = 0; instr = '0;
        rd(2'd3, v3);
        sg = (s == 0) ? 1 : -1;
        e = v0 + 128'(sg) * 128'(q) * v1;
        check(v3 + W * (128'(olc) + 128'(sg) * 128'(mlc)) == e, $sformatf("mul q=%0d s=%0d", q, s));
      end

      // arithmetic unit output straight to memory
      @(negedge clk); instr = {I_STAU, 6'b01_00_01}; strobe = 1; #1;
      check(mem_drive && wval(mem_wdata) + W * 128'(ol_out) == v0 - v1, "STAU subtract");
      @(negedge clk); strobe = 0; instr = '0;

      // whole digit shifts, path 0, left then right
      x = $urandom_range(0, 20) - 10;
      @(negedge clk); instr = {I_SHIFT1, 6'b00_00_00}; strobe = 1; sp0_r_in = dmake(x); #1;
      outd = sp0_l_out;
      @(negedge clk); strobe = 0; instr = '0;
      rd(2'd0, v2);
      check(v2 == 16 * v0 + 128'(x) - W * 128'(dval(outd)), "shift left whole");
      @(negedge clk); instr = {I_SHIFT1, 6'b00_00_10}; strobe = 1; sp0_l_in = outd; #1;
      outd1 = sp0_r_out;
      @(negedge clk); strobe = 0; instr = '0;
      rd(2'd0, v2);
      check(v2 == v0 && dval(outd1) == x, "shift right whole restores");

      // half digit shifts (radix 4) on both paths: r0 on sp0, r1 on sp1
      @(negedge clk); instr = {I_SHIFT, 6'b00_01_01}; strobe = 1;
      sp0_r_in = '{hi: 3'sd0, lo: 3'sd1}; sp1_r_in = '{hi: 3'sd0, lo: -3'sd2}; #1;
      outd = sp0_l_out; outd1 = sp1_l_out;
      @(negedge clk); strobe = 0; instr = '0;
      rd(2'd0, v2); rd(2'd1, v3);
      check(v2 == 4 * v0 + 1 - W * 128'(dval(outd)), "half left sp0");
      check(v3 == 4 * v1 - 2 - W * 128'(dval(outd1)), "half left sp1");
      check(outd.hi == 0 && outd1.hi == 0, "half digit travels in the low field");
      @(negedge clk); instr = {I_SHIFT, 6'b00_01_11}; strobe = 1; sp0_l_in = outd; sp1_l_in = outd1; #1;
      check(dval(sp0_r_out) == 1 && dval(sp1_r_out) == -2, "half right digits out");
      @(negedge clk); strobe = 0; instr = '0;
      rd(2'd0, v2); rd(2'd1, v3);
      check(v2 == v0 && v3 == v1, "half right restores");

      // sign, leading zeros, normalization on r0
      issue(I_SENSE, 6'd0); #1;
      begin
        int elz, nzd;
        sign_t es;
        int ee;
        elz = 0;
        for (int i = ND - 1; i >= 0 && w0[5*i +: 5] == 5'd10; i--) elz++;
        es = (v0 > 0) ? SGN_POS : (v0 < 0) ? SGN_NEG : SGN_ZERO;
        check(int'(lz) == elz, $sformatf("lz %0d exp %0d", lz, elz));
        check(sign_out == es, "sign of register");
        ee = 256 * (int'(w0[79:75]) - 10) + 16 * (int'(w0[74:70]) - 10) + (int'(w0[69:65]) - 10);
        if (ee < 0) ee = -ee;
        // fraction ee/4096 against 1/32, 1/8, 1/4
        check(norm == {ee >= 128, ee >= 512, ee >= 1024}, "normalization");
      end

      // zero and single digit value: r2 <- r0 - r0 (+ small) and detection
      @(negedge clk); instr = {I_SUB, 6'b10_00_00}; strobe = 1; #1;
      check(zero && sdv_ok && sdv_val == 0, "zero result detected");
      @(negedge clk); strobe = 0; instr = '0;
    end

    // square-root step: root digits inserted left to right, newest not doubled
    issue(I_RDPCLR, 6'd0);
    issue(I_CLR, 6'd3);
    issue(I_SETMPD, {1'b0, 5'(7 + 10)});
    issue(I_RDPINS, 6'd3);
    issue(I_SETMPD, {1'b0, 5'(-4 + 10)});
    issue(I_RDPINS, 6'd3);
    rd(2'd3, v3);
    check(v3 == 128'(7) * (W / 16) - 128'(4) * (W / 256), "root digits accumulated in place");
    w0 = rand_word(16); ld(2'd0, w0); rd(2'd0, v0);
    @(negedge clk); instr = {I_ROOT, 6'b10_00_11}; strobe = 1; #1;
    olc = ol_out; mlc = ml_out; dlc = dbl_out;
    @(negedge clk); strobe = 0; instr = '0;
    rd(2'd2, v2);
    // M = 2*7*16^15 - 4*16^14 (top digit doubled) minus what left as doubler transfer
    e = v0 - 128'(-4) * (128'(14) * (W / 16) - 128'(4) * (W / 256) - W * 128'(dlc));
    check(v2 + W * (128'(olc) - 128'(mlc)) == e, "root recurrence step");
    check(dlc == 1, "doubled 7 leaves a doubler transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
