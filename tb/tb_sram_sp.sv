// tb_sram_sp: writes random words to random addresses of a small RAM,
// keeps a copy in the testbench, and checks every read one cycle later;
// also checks that a cycle without ce leaves the read data unchanged.
module tb_sram_sp;
  localparam int AW = 6, DW = 80;
  logic clk = 0, ce = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  logic          valid [2**AW];
  int checks = 0, failures = 0;

  sram_sp #(.AW(AW), .DW(DW)) dut (.clk, .ce, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [DW-1:0] exp;
    for (int i = 0; i < 2**AW; i++) valid[i] = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      addr = AW'($urandom);
      if ($urandom_range(0, 1) == 1 || !valid[addr]) begin
        ce = 1; we = 1; wdata = {16'($urandom), 32'($urandom), 32'($urandom)};
        model[addr] = wdata; valid[addr] = 1;
      end else begin
        ce = 1; we = 0; exp = model[addr];
        @(negedge clk); ce = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL read %0d", addr); end
        @(negedge clk);
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
