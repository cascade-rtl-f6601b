// tb_root_pos_reg: steps the root digit position register through a full
// extraction (16 insertions) as the most significant chip (dp_in = 1) and
// checks after each step that exactly the next position is offered for
// insertion and that all set positions except the newest are doubled. Then
// clears it and checks the chain input from the left and right neighbours.
module tb_root_pos_reg;
  localparam int ND = 16;
  logic clk = 0, rst = 1, clr = 0, insert = 0, dp_in = 1, rdp_r_in = 0;
  logic dp_out, rdp_l_out;
  logic [ND-1:0] ins_pos, double_sel;
  int checks = 0, failures = 0;

  root_pos_reg #(.ND(ND)) dut (.clk, .rst, .clr, .insert, .dp_in, .dp_out, .rdp_r_in,
                               .rdp_l_out, .ins_pos, .double_sel);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [ND-1:0] set_mask;
    @(posedge clk); rst <= 0;
    @(posedge clk);
    for (int k = 0; k <= ND; k++) begin
      // k digits inserted so far: top k positions set
      set_mask = (k == 0) ? '0 : ~((ND'(1) << (ND - k)) - 1'b1);
      #1;
      check(ins_pos == ((k < ND) ? ND'(1) << (ND - 1 - k) : '0), $sformatf("ins_pos k=%0d %h", k, ins_pos));
      check(double_sel == (set_mask & (set_mask << 1)), $sformatf("double k=%0d %h", k, double_sel));
      check(dp_out == (k == ND), "dp_out");
      check(rdp_l_out == (k > 0), "rdp_l_out");
      insert <= 1; @(posedge clk); insert <= 0;
    end
    // with a set right neighbour the least significant digit is doubled too
    rdp_r_in = 1; #1;
    check(double_sel == '1, "all doubled with right neighbour set");
    clr <= 1; @(posedge clk); clr <= 0; #1;
    check(ins_pos == ND'(1) << (ND - 1), "after clear");
    dp_in = 0; #1;
    check(ins_pos == '0, "no token from the left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
