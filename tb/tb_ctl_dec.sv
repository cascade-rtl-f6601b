// tb_ctl_dec: applies every opcode with random fields and checks the
// decoded fields and arithmetic-unit modes against a table written out
// here, and that the broadcast digit register loads only on a strobed
// SETMPD and converts the <31.10> code to the digit's value.
module tb_ctl_dec;
  import cascade_pkg::*;
  logic clk = 0, rst = 1, strobe = 0;
  logic [9:0] instr = '0;
  iop_t op;
  logic en, sr, sh, mul, sub, dbl, wr;
  logic [1:0] fh, fm, fl;
  digit6_t mpd;
  int checks = 0, failures = 0;

  ctl_dec dut (.clk, .rst, .strobe, .instr, .op, .en, .f_hi(fh), .f_mid(fm), .f_lo(fl),
               .shift_right(sr), .shift_half(sh), .au_mul(mul), .au_sub(sub), .au_dbl(dbl),
               .au_write(wr), .mpd);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // expected {mul, sub(with bit4=0), dbl, write} per opcode 0..15
    logic [3:0] exp_modes [16] = '{4'b0000, 4'b0000, 4'b0000, 4'b0000, 4'b0001, 4'b0101,
                                  4'b1001, 4'b1101, 4'b1111, 4'b0000, 4'b0000, 4'b0000,
                                  4'b0000, 4'b0000, 4'b0000, 4'b0000};
    @(posedge clk); rst <= 0;
    for (int it = 0; it < 400; it++) begin
      instr = 10'($urandom);
      instr[4] = 1'b0;
      #1;
      check(op == iop_t'(instr[9:6]), "op");
      check(fh == instr[5:4] && fm == instr[3:2] && fl == instr[1:0], "fields");
      check(sr == instr[1] && sh == instr[0], "shift flags");
      check({mul, sub, dbl, wr} == exp_modes[instr[9:6]], $sformatf("modes op=%0d", instr[9:6]));
    end
    instr = {I_STAU, 6'b010000}; #1;
    check(sub == 1'b1 && wr == 1'b0, "STAU with subtract");
    // digit register: all 21 codes
    for (int v = -10; v <= 10; v++) begin
      @(negedge clk); instr = {I_SETMPD, 1'b0, 5'(v + 10)}; strobe = 1;
      @(negedge clk); strobe = 0; instr = {I_SETMPD, 1'b0, 5'd10};
      @(negedge clk);
      check(dval(mpd) == v, $sformatf("mpd %0d got %0d", v, dval(mpd)));
      check(mpd.hi >= -2 && mpd.hi <= 2 && mpd.lo >= -2 && mpd.lo <= 2, "mpd fields in <4.2>");
    end
    check(en == 1'b0, "en follows strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
