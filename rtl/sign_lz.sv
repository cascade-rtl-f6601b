// sign_lz: sign computer and leading-zeros counter of one arithmetic chip.
//
// The sign of a signed-digit number is the sign of its most significant
// non-zero digit. Each position reports its own sign if its digit is
// non-zero and otherwise the sign of the position to its right; the chain
// continues across chips (sign_in comes from the less significant chip,
// sign_out goes to the more significant chip or, from the most significant
// chip, to the control chip). The document builds this as a self-timed
// priority chain; here it is a combinational priority encoder.
// The counter gives the number of leading zero digits of the chip's digits,
// 0..16; the control chip adds up counts from the most significant chip down
// until one is below 16. Combinational.
module sign_lz
  import cascade_pkg::*;
#(
  parameter int ND = DIGITS_PER_CHIP
) (
  input  digit6_t [ND-1:0]         d,
  input  sign_t                    sign_in,
  output sign_t                    sign_out,
  output logic [$clog2(ND+1)-1:0]  lz
);

  always_comb begin
    sign_t s;
    s = sign_in;
    for (int i = 0; i < ND; i++)
      if (dval(d[i]) != 0) s = sign_of(dval(d[i]));
    sign_out = s;

    lz = '0;
    for (int i = ND - 1; i >= 0; i--) begin
      if (dval(d[i]) != 0) break;
      lz = lz + 1'b1;
    end
  end

endmodule
