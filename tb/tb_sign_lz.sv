// tb_sign_lz: checks the sign computer and leading-zero counter on random
// digit vectors with random numbers of leading zeros and random incoming
// signs against a reference scan of the digit values.
module tb_sign_lz;
  import cascade_pkg::*;
  localparam int ND = 16;
  digit6_t [ND-1:0] d;
  sign_t sin, sout;
  logic [4:0] lz;
  int checks = 0, failures = 0;

  sign_lz #(.ND(ND)) dut (.d, .sign_in(sin), .sign_out(sout), .lz);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nz, v, exp_lz;
    sign_t exp_s;
    for (int it = 0; it < 5000; it++) begin
      nz = $urandom_range(0, ND);               // number of leading zeros
      for (int i = 0; i < ND; i++) begin
        v = int'($urandom_range(0, 20)) - 10;
        if (i >= ND - nz) v = 0;
        else if (i == ND - nz - 1 && v == 0) v = ($urandom_range(0, 1) == 1) ? 3 : -3;
        d[i] = dmake(v);
      end
      case ($urandom_range(0, 2)) 0: sin = SGN_ZERO; 1: sin = SGN_POS; default: sin = SGN_NEG; endcase
      #1;
      exp_lz = 0;
      for (int i = ND - 1; i >= 0 && dval(d[i]) == 0; i--) exp_lz++;
      exp_s = (exp_lz == ND) ? sin : (dval(d[ND-1-exp_lz]) > 0 ? SGN_POS : SGN_NEG);
      checks++; if (int'(lz) != exp_lz) begin failures++; $display("FAIL lz %0d exp %0d", lz, exp_lz); end
      checks++; if (sout != exp_s) begin failures++; $display("FAIL sign"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
